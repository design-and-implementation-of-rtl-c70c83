// tb_dma_stress: randomised stress run of the whole controller at default
// parameters.
//
// 300 requests follow each other as fast as the handshake allows, with the
// mode, destination, request source (pin or start bit) and an injected
// error (none, one or two flipped codeword bits on one random word) chosen
// at random. A reference model of the memory contents is kept from the
// peripheral strobes. For every request it checks the number of words
// moved, the acknowledge-to-last-write latency (2 or 5 cycles), the
// read-back verdicts and data, and the STATUS flags; between requests the
// CPU reads random words (some of them while the next transfer owns the
// memory) and checks the corrected data or the double-error flag.
module tb_dma_stress;
  import dma_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        dma_req, dma_ack, dma_done, periph_rd;
  logic [7:0]  periph_data;
  logic        csr_we;
  logic [1:0]  csr_addr;
  logic [7:0]  csr_wdata, csr_rdata;
  logic        irq;
  logic        cpu_mem_req, cpu_mem_we, cpu_mem_gnt, cpu_mem_single_err, cpu_mem_double_err;
  logic [3:0]  cpu_mem_addr;
  logic [7:0]  cpu_mem_wdata, cpu_mem_rdata;
  logic        chk_valid, chk_single, chk_double;
  logic [7:0]  chk_data;
  logic [3:0]  chk_syndrome;
  dma_state_e  dma_state;
  logic [12:0] err_inject;

  dma_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_single, n_burst, n_refused, n_corr, n_double, n_stall;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cyc, what);
    end
  endtask

  // peripheral, injection and monitors
  logic [7:0]  cur_word;
  int          word_idx, inj_idx, ack_cyc, last_rd_cyc, n_strobes, n_chk, n_chk_s, n_chk_d;
  logic [12:0] inj_mask;
  logic [3:0]  cur_base;
  logic [7:0]  exp_mem [16];
  bit          exp_bad [16];
  logic [7:0]  chk_q[$];

  assign periph_data = cur_word;
  always_comb err_inject = (periph_rd && word_idx == inj_idx) ? inj_mask : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dma_ack) begin ack_cyc = cyc; word_idx <= 0; end
    if (periph_rd) begin
      exp_mem[cur_base + 4'(word_idx)] = periph_data;
      exp_bad[cur_base + 4'(word_idx)] = (word_idx == inj_idx && $countones(inj_mask) >= 2);
      cur_word <= 8'($urandom);
      word_idx <= word_idx + 1;
      n_strobes++;
      last_rd_cyc = cyc;
    end
    if (chk_valid) begin
      n_chk++;
      chk_q.push_back(chk_data);
      if (chk_single) n_chk_s++;
      if (chk_double) n_chk_d++;
    end
  end

  task automatic csr_wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk);
    csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk);
    csr_we = 0;
  endtask

  task automatic cpu_read(input logic [3:0] a, output int stalls);
    @(negedge clk);
    cpu_mem_req = 1; cpu_mem_we = 0; cpu_mem_addr = a;
    stalls = 0;
    #1;
    while (!cpu_mem_gnt) begin
      stalls++;
      @(negedge clk); #1;
    end
    if (exp_bad[a]) check(cpu_mem_double_err && !cpu_mem_single_err, $sformatf("CPU read %0d double flag", a));
    else check(cpu_mem_rdata == exp_mem[a] && !cpu_mem_double_err,
               $sformatf("CPU read %0d = %02h, expected %02h", a, cpu_mem_rdata, exp_mem[a]));
    @(negedge clk);
    cpu_mem_req = 0;
  endtask

  initial begin
    int stalls;
    dma_req = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    cpu_mem_req = 0; cpu_mem_we = 0; cpu_mem_addr = 0; cpu_mem_wdata = 0;
    cur_word = 8'h00; word_idx = 0; inj_idx = -1; inj_mask = '0; cur_base = 0;
    {n_single, n_burst, n_refused, n_corr, n_double, n_stall} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // initialise memory through the CPU port
    for (int i = 0; i < 16; i++) begin
      exp_mem[i] = 8'($urandom); exp_bad[i] = 0;
      @(negedge clk);
      cpu_mem_req = 1; cpu_mem_we = 1; cpu_mem_addr = 4'(i); cpu_mem_wdata = exp_mem[i];
      @(negedge clk);
      cpu_mem_req = 0; cpu_mem_we = 0;
    end

    for (int n = 0; n < 300; n++) begin
      dma_mode_e m;
      logic [3:0] a;
      int len, nbits, r;
      bit refused, by_pin;
      logic [7:0] st;
      r = $urandom_range(19, 0);
      m = (r == 0) ? MODE_NONE : (r == 1) ? MODE_RSVD : (r < 10) ? MODE_SINGLE : MODE_BURST;
      a = 4'($urandom);
      by_pin = 1'($urandom);
      len = (m == MODE_SINGLE) ? 1 : (m == MODE_BURST) ? 4 : 0;
      refused = (len == 0) || (int'(a) + len > 16);
      nbits = $urandom_range(2, 0);
      inj_mask = '0;
      while ($countones(inj_mask) < nbits) inj_mask[$urandom_range(12, 0)] = 1'b1;
      inj_idx = (nbits > 0 && len > 0) ? $urandom_range(len - 1, 0) : -1;
      n_strobes = 0; n_chk = 0; n_chk_s = 0; n_chk_d = 0; chk_q.delete();

      csr_wr(CSR_STATUS, 8'hff);
      csr_wr(CSR_ADDR, 8'(a));
      cur_base = a;
      if (by_pin) begin
        csr_wr(CSR_CTRL, {5'b0, 1'b1, m});
        @(negedge clk); dma_req = 1;
        wait (dma_ack == 1);
        @(negedge clk); dma_req = 0;
      end else begin
        csr_wr(CSR_CTRL, {1'b1, 4'b0, 1'b1, m});
        wait (dma_ack == 1);
      end
      // sometimes read from the CPU while the transfer runs
      if ($urandom_range(3, 0) == 0) begin
        cpu_read(4'($urandom), stalls);
        if (stalls > 0) n_stall++;
      end
      wait (dma_state == S_IDLE);
      @(negedge clk);

      check(n_strobes == (refused ? 0 : len), "words moved");
      st = 8'h00;
      csr_addr = CSR_STATUS; #1; st = csr_rdata;
      check(st[ST_DONE], "done flag");
      check(st[ST_MODE_ERR] == (len == 0), "mode error flag");
      check(st[ST_ADDR_ERR] == (len > 0 && refused), "address error flag");
      if (refused) begin
        n_refused++;
        check(n_chk == 0, "refused: no read-back");
      end else begin
        check(last_rd_cyc - ack_cyc + 1 == len + 1, "latency");
        check(n_chk == len, "read-back count");
        check(n_chk_s == (nbits == 1 ? 1 : 0) && n_chk_d == (nbits == 2 ? 1 : 0), "read-back verdicts");
        check(st[ST_SINGLE] == (nbits == 1) && st[ST_DOUBLE] == (nbits == 2), "status ECC flags");
        for (int i = 0; i < len && i < chk_q.size(); i++)
          if (!exp_bad[a + 4'(i)]) check(chk_q[i] == exp_mem[a + 4'(i)], "read-back data");
        if (m == MODE_SINGLE) n_single++; else n_burst++;
        if (nbits == 1) n_corr++;
        if (nbits == 2) n_double++;
      end
      inj_idx = -1;
      // a couple of CPU reads between transfers
      repeat (2) cpu_read(4'($urandom), stalls);
    end
    for (int i = 0; i < 16; i++) cpu_read(4'(i), stalls);

    $display("requests: single=%0d burst=%0d refused=%0d corrected=%0d double=%0d cpu_stalls=%0d",
             n_single, n_burst, n_refused, n_corr, n_double, n_stall);
    check(n_single > 0 && n_burst > 0 && n_refused > 0 && n_corr > 0 && n_double > 0 && n_stall > 0,
          "every kind of request occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
