// tb_dma_controller: transfer-level test of the DMA state machine.
//
// Around the FSM the testbench models a byte memory (written on mem_we), a
// peripheral that hands out the next word of a counting sequence on each
// periph_rd strobe, an arbiter grant it can withhold, and per-address error
// flags returned during read-back. A monitor samples every clock edge.
// Checked for each transfer: one-cycle acknowledge; the written addresses
// and data; acknowledge-to-last-write latency of 2 cycles (single) and
// 5 cycles (4-word burst) with the grant held high; done in the cycle after
// the last write; one read-back per written word with the error flags
// passed through; refused transfers (reserved mode, burst past the last
// word) writing nothing and flagging mode_err / addr_err; grant stalls; and
// back-to-back requests.
module tb_dma_controller;
  import dma_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       dma_req, dma_ack, busy, done, addr_err, mode_err;
  dma_mode_e  mode;
  logic [3:0] dst_addr;
  logic       periph_rd;
  logic [7:0] periph_data;
  logic       bus_req, bus_gnt, mem_we;
  logic [3:0] mem_addr;
  logic [7:0] mem_wdata;
  logic       rd_single_err, rd_double_err, chk_valid, chk_single, chk_double;
  dma_state_e state;

  int checks = 0, failures = 0;
  int cyc = 0;

  dma_controller #(.DATA_W(8), .ADDR_W(4), .BURST_LEN(4)) dut (.*);

  always #5 clk = ~clk;

  // models
  logic [7:0] mem [16];
  logic [7:0] next_word;
  bit         err_s [16], err_d [16];
  assign periph_data   = next_word;
  assign rd_single_err = err_s[mem_addr];
  assign rd_double_err = err_d[mem_addr];

  // monitor records
  int ack_cyc, last_wr_cyc, done_cyc, n_ack, n_wr, n_done, n_chk, n_chk_s, n_chk_d;
  int n_aerr, n_merr, prev_ack;
  logic [3:0] wr_addrs[$], chk_addrs[$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dma_ack) begin
        n_ack++; ack_cyc = cyc;
        checks++;
        if (prev_ack) begin failures++; $display("FAIL ack longer than one cycle"); end
      end
      prev_ack = dma_ack;
      if (mem_we) begin
        checks++;
        if (!bus_gnt || !periph_rd) begin failures++; $display("FAIL write without grant/strobe"); end
        mem[mem_addr] <= mem_wdata;
        wr_addrs.push_back(mem_addr);
        n_wr++; last_wr_cyc = cyc;
      end
      if (periph_rd) next_word <= next_word + 8'd1;
      if (done) begin
        n_done++; done_cyc = cyc;
        if (addr_err) n_aerr++;
        if (mode_err) n_merr++;
      end
      if (chk_valid) begin
        n_chk++;
        chk_addrs.push_back(mem_addr);
        if (chk_single) n_chk_s++;
        if (chk_double) n_chk_d++;
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic clear_counts();
    n_ack = 0; n_wr = 0; n_done = 0; n_chk = 0; n_chk_s = 0; n_chk_d = 0;
    n_aerr = 0; n_merr = 0;
    wr_addrs.delete(); chk_addrs.delete();
  endtask

  // Run one request; stall_cycles withholds the grant for that many cycles
  // in the middle of the write phase.
  task automatic run(input dma_mode_e m, input logic [3:0] a, input int stall_cycles,
                     input int exp_len, input bit exp_aerr, input bit exp_merr,
                     input int exp_s, input int exp_d);
    logic [7:0] first;
    int         len;
    clear_counts();
    first = next_word;
    @(negedge clk);
    dma_req = 1; mode = m; dst_addr = a;
    wait (dma_ack == 1);
    @(negedge clk);
    dma_req = 0;
    if (stall_cycles > 0) begin
      @(negedge clk);
      bus_gnt = 0;
      repeat (stall_cycles) @(negedge clk);
      bus_gnt = 1;
    end
    wait (busy == 0);
    @(negedge clk);
    len = exp_len;
    check(n_ack == 1, "one acknowledge");
    check(n_done == 1, "one done");
    check(n_wr == len, $sformatf("%0d writes, expected %0d", n_wr, len));
    check(n_chk == len, $sformatf("%0d read-backs, expected %0d", n_chk, len));
    check(n_aerr == int'(exp_aerr) && n_merr == int'(exp_merr), "error flags with done");
    check(n_chk_s == exp_s && n_chk_d == exp_d, "read-back error flags");
    for (int i = 0; i < len && i < wr_addrs.size(); i++) begin
      check(wr_addrs[i] == a + 4'(i), "write address");
      check(mem[a + 4'(i)] == first + 8'(i), "written data");
    end
    for (int i = 0; i < len && i < chk_addrs.size(); i++)
      check(chk_addrs[i] == a + 4'(i), "read-back address");
    if (len > 0) begin
      if (stall_cycles == 0)
        check(last_wr_cyc - ack_cyc + 1 == (m == MODE_SINGLE ? 2 : 5),
              $sformatf("latency %0d cycles", last_wr_cyc - ack_cyc + 1));
      else
        check(last_wr_cyc - ack_cyc + 1 == len + 1 + stall_cycles, "stalled latency");
      check(done_cyc == last_wr_cyc + 1, "done after last write");
    end else begin
      check(done_cyc == ack_cyc + 1, "refused transfer completes at once");
    end
  endtask

  initial begin
    dma_req = 0; mode = MODE_NONE; dst_addr = 0; bus_gnt = 1; next_word = 8'h40;
    prev_ack = 0;
    for (int i = 0; i < 16; i++) begin err_s[i] = 0; err_d[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == S_IDLE && !busy, "idle after reset");

    run(MODE_SINGLE, 4'd2, 0, 1, 0, 0, 0, 0);
    run(MODE_BURST,  4'd4, 0, 4, 0, 0, 0, 0);
    err_s[9] = 1; err_d[11] = 1;
    run(MODE_BURST,  4'd8, 0, 4, 0, 0, 1, 1);
    run(MODE_SINGLE, 4'd9, 0, 1, 0, 0, 1, 0);
    run(MODE_BURST,  4'd12, 0, 4, 0, 0, 0, 0);   // last four words: in range
    run(MODE_BURST,  4'd13, 0, 0, 1, 0, 0, 0);   // runs past the end
    run(MODE_NONE,   4'd0, 0, 0, 0, 1, 0, 0);
    run(MODE_RSVD,   4'd0, 0, 0, 0, 1, 0, 0);
    run(MODE_BURST,  4'd0, 2, 4, 0, 0, 0, 0);    // grant withheld 2 cycles
    run(MODE_SINGLE, 4'd15, 0, 1, 0, 0, 0, 0);

    // back-to-back: request held high through two transfers
    clear_counts();
    @(negedge clk);
    dma_req = 1; mode = MODE_BURST; dst_addr = 4'd0;
    wait (n_done == 1);
    wait (n_ack == 2);
    @(negedge clk);
    dma_req = 0;
    wait (busy == 0);
    @(negedge clk);
    check(n_wr == 8 && n_done == 2 && n_chk == 8, "back-to-back transfers");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
