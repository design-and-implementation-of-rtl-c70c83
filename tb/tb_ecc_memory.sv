// tb_ecc_memory: random write/read traffic against a reference array.
//
// Every address is first written, then 2000 random cycles mix writes and
// reads. The read port is asynchronous: rdata is compared in the cycle the
// address is applied, before any write at that edge. A write must be
// visible after the clock edge.
module tb_ecc_memory;
  logic        clk = 0;
  logic        we;
  logic [3:0]  addr;
  logic [12:0] wdata, rdata;
  logic [12:0] model [16];
  int checks = 0, failures = 0;

  ecc_memory #(.CW_W(13), .ADDR_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; addr = 4'(a); wdata = 13'($urandom);
      model[a] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 0; addr = 4'($urandom); #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL addr=%0d rdata=%h exp=%h", addr, rdata, model[addr]);
      end
      if ($urandom_range(1, 0) == 1) begin
        we = 1; wdata = 13'($urandom);
        model[addr] = wdata;
      end
    end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
