// tb_dma_csr: register-level test of the control and status registers.
//
// Checks reset values, CTRL/ADDR write and read-back, the start request
// being held until the DMA acknowledge, sticky STATUS flags set by events
// and cleared by writing 1 (an event in the clearing cycle wins), the busy
// bit, and irq gating by the interrupt enable.
module tb_dma_csr;
  import dma_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       csr_we;
  logic [1:0] csr_addr;
  logic [7:0] csr_wdata, csr_rdata;
  logic       start_req, irq;
  dma_mode_e  mode;
  logic [3:0] dst_addr;
  logic       dma_ack, dma_busy, ev_done, ev_single, ev_double, ev_addr_err, ev_mode_err;
  int checks = 0, failures = 0;

  dma_csr #(.ADDR_W(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (rdata=%02h)", what, csr_rdata);
    end
  endtask

  task automatic wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk);
    csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk);
    csr_we = 0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [7:0] d);
    @(negedge clk);
    csr_addr = a; #1;
    d = csr_rdata;
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1;
    @(negedge clk); sig = 0;
  endtask

  initial begin
    logic [7:0] d;
    csr_we = 0; csr_addr = 0; csr_wdata = 0;
    {dma_ack, dma_busy, ev_done, ev_single, ev_double, ev_addr_err, ev_mode_err} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(2'd0, d); check(d == 8'h00, "CTRL reset");
    rd(2'd2, d); check(d == 8'h00, "STATUS reset");
    check(!irq && !start_req, "outputs reset");

    wr(2'd1, 8'h0b);
    rd(2'd1, d); check(d == 8'h0b && dst_addr == 4'hb, "ADDR write");
    wr(2'd0, 8'h06);                 // burst, irq enabled, no start
    rd(2'd0, d); check(d == 8'h06 && mode == MODE_BURST && !start_req, "CTRL write");
    wr(2'd0, 8'h85);                 // single, irq enabled, start
    check(start_req && mode == MODE_SINGLE, "start raised");
    repeat (3) @(negedge clk);
    check(start_req, "start held");
    rd(2'd0, d); check(d == 8'h85, "CTRL shows pending start");
    pulse(dma_ack);
    check(!start_req, "start cleared by ack");

    dma_busy = 1; #1;
    rd(2'd2, d); check(d == 8'h80, "busy bit");
    dma_busy = 0;

    check(!irq, "no irq before event");
    pulse(ev_done);
    rd(2'd2, d); check(d == 8'h01 && irq, "done flag and irq");
    pulse(ev_single);
    pulse(ev_double);
    pulse(ev_addr_err);
    pulse(ev_mode_err);
    rd(2'd2, d); check(d == 8'h1f, "all flags sticky");
    wr(2'd2, 8'h05);
    rd(2'd2, d); check(d == 8'h1a, "W1C clears done and double");
    // clear single while a new single event arrives: flag stays
    @(negedge clk);
    csr_we = 1; csr_addr = 2'd2; csr_wdata = 8'h02; ev_single = 1;
    @(negedge clk);
    csr_we = 0; ev_single = 0;
    rd(2'd2, d); check(d == 8'h1a, "event wins over clear");
    wr(2'd0, 8'h01);                 // irq disabled
    check(!irq, "irq masked");
    wr(2'd0, 8'h05);
    check(irq, "irq unmasked");
    wr(2'd2, 8'h1f);
    rd(2'd2, d); check(d == 8'h00 && !irq, "all cleared");
    rd(2'd3, d); check(d == 8'h00, "unused address reads zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
