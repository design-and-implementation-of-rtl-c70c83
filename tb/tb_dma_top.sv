// tb_dma_top: end-to-end test of the ECC DMA controller at its default size
// (8-bit data, 13-bit codewords, 16-word memory, 4-word bursts).
//
// The testbench plays CPU (register port and memory port) and peripheral
// (dma_req, and a data port that hands out the next word of a random
// sequence on each periph_rd strobe). It injects faults by XORing a mask
// into chosen codewords as they are written. Expected memory contents and
// flags are tracked by the testbench itself. Each mechanism is counted and
// a mechanism that never happens is a failure:
//   single transfer, burst transfer, start by register, start by pin,
//   corrected single error (read-back and CPU read), detected double error,
//   CPU held off while the DMA owns memory, address error, mode error,
//   back-to-back requests, interrupt raised and masked.
// The acknowledge-to-last-write latency is checked: 2 cycles single,
// 5 cycles burst.
module tb_dma_top;
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

  // mechanism counters
  int m_single, m_burst, m_start_reg, m_start_pin, m_corr, m_cpu_corr, m_double;
  int m_cpu_stall, m_addr_err, m_mode_err, m_b2b, m_irq, m_irq_masked;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d %s", cyc, what);
    end
  endtask

  // ---------------- peripheral model and monitors ----------------
  logic [7:0] cur_word;
  int         word_idx;          // strobes within the current transfer
  int         inj_idx;           // word index to corrupt, -1 for none
  logic [12:0] inj_mask;
  int         ack_cyc, last_rd_cyc, n_strobes, n_chk, n_chk_s, n_chk_d, n_done;
  logic [7:0] chk_q[$];

  assign periph_data = cur_word;
  always_comb err_inject = (periph_rd && word_idx == inj_idx) ? inj_mask : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dma_ack) begin ack_cyc = cyc; word_idx <= 0; end
    if (periph_rd) begin
      cur_word <= 8'($urandom);
      word_idx <= word_idx + 1;
      n_strobes++;
      last_rd_cyc = cyc;
    end
    if (dma_done) n_done++;
    if (chk_valid) begin
      n_chk++;
      chk_q.push_back(chk_data);
      if (chk_single) n_chk_s++;
      if (chk_double) n_chk_d++;
    end
  end

  // expected memory contents (data), and which words hold a double error
  logic [7:0] exp_mem [16];
  bit         exp_bad [16];
  logic [3:0] cur_base;          // destination programmed for the transfer

  always @(posedge clk)
    if (periph_rd) begin
      exp_mem[cur_base + 4'(word_idx)] = periph_data;
      exp_bad[cur_base + 4'(word_idx)] = 0;
    end

  // ---------------- CPU helpers ----------------
  task automatic csr_wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk);
    csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk);
    csr_we = 0;
  endtask

  task automatic csr_rd(input logic [1:0] a, output logic [7:0] d);
    @(negedge clk);
    csr_addr = a; #1;
    d = csr_rdata;
  endtask

  // Memory access by the CPU; waits for the grant, counts the stall cycles.
  task automatic cpu_access(input bit we, input logic [3:0] a, input logic [7:0] wd,
                            output logic [7:0] rd, output bit se, output bit de,
                            output int stalls);
    @(negedge clk);
    cpu_mem_req = 1; cpu_mem_we = we; cpu_mem_addr = a; cpu_mem_wdata = wd;
    stalls = 0;
    #1;
    while (!cpu_mem_gnt) begin
      stalls++;
      @(negedge clk); #1;
    end
    rd = cpu_mem_rdata; se = cpu_mem_single_err; de = cpu_mem_double_err;
    @(negedge clk);
    cpu_mem_req = 0; cpu_mem_we = 0;
  endtask

  task automatic clear_counts();
    n_strobes = 0; n_chk = 0; n_chk_s = 0; n_chk_d = 0; n_done = 0;
    chk_q.delete();
  endtask

  // One DMA transfer. by_pin: request by dma_req, else by the CTRL start bit.
  // inj: word index to corrupt with mask (or -1).
  task automatic transfer(input dma_mode_e m, input logic [3:0] a, input bit by_pin,
                          input int inj, input logic [12:0] mask,
                          input int exp_len, input bit exp_aerr, input bit exp_merr);
    logic [7:0] st;
    logic [7:0] words[$];
    int         nbits;
    clear_counts();
    inj_idx = inj; inj_mask = mask;
    nbits = $countones(mask);
    csr_wr(CSR_STATUS, 8'hff);                       // clear old flags
    csr_wr(CSR_ADDR, 8'(a));
    cur_base = a;
    if (by_pin) begin
      csr_wr(CSR_CTRL, {5'b0, 1'b1, m});
      @(negedge clk); dma_req = 1;
      wait (dma_ack == 1);
      @(negedge clk); dma_req = 0;
      m_start_pin++;
    end else begin
      csr_wr(CSR_CTRL, {1'b1, 4'b0, 1'b1, m});
      m_start_reg++;
    end
    // record the words as they are handed out
    fork
      begin
        while (n_done == 0) begin
          @(posedge clk);
          if (periph_rd) words.push_back(periph_data);
        end
      end
    join
    wait (dma_state == S_IDLE);
    @(negedge clk);
    check(n_strobes == exp_len, $sformatf("%0d words moved, expected %0d", n_strobes, exp_len));
    check(n_done == 1, "one done");
    for (int i = 0; i < exp_len && i < words.size(); i++) begin
      exp_mem[a + 4'(i)] = words[i];
      exp_bad[a + 4'(i)] = (i == inj && nbits >= 2);
    end
    if (exp_len > 0) begin
      int lat;
      lat = last_rd_cyc - ack_cyc + 1;
      check(lat == (m == MODE_SINGLE ? 2 : 5), $sformatf("latency %0d cycles", lat));
      if (m == MODE_SINGLE) m_single++; else m_burst++;
      check(n_chk == exp_len, "every word read back");
      // read-back data is the corrected data unless a double error
      for (int i = 0; i < exp_len && i < chk_q.size(); i++)
        if (!(i == inj && nbits >= 2))
          check(chk_q[i] == words[i], $sformatf("read-back word %0d", i));
      check(n_chk_s == ((inj >= 0 && nbits == 1) ? 1 : 0), "read-back single count");
      check(n_chk_d == ((inj >= 0 && nbits >= 2) ? 1 : 0), "read-back double count");
      if (inj >= 0 && nbits == 1) m_corr++;
      if (inj >= 0 && nbits == 2) m_double++;
    end
    csr_rd(CSR_STATUS, st);
    check(st[ST_DONE] == 1, "status done");
    check(st[ST_ADDR_ERR] == exp_aerr, "status address error");
    check(st[ST_MODE_ERR] == exp_merr, "status mode error");
    check(st[ST_SINGLE] == (inj >= 0 && nbits == 1 && exp_len > 0), "status single");
    check(st[ST_DOUBLE] == (inj >= 0 && nbits >= 2 && exp_len > 0), "status double");
    check(st[ST_BUSY] == 0, "not busy");
    check(irq == 1, "irq raised");
    if (irq) m_irq++;
    if (exp_aerr) m_addr_err++;
    if (exp_merr) m_mode_err++;
    inj_idx = -1;
  endtask

  // Read every word through the CPU port and compare with the model.
  task automatic cpu_check_all();
    logic [7:0] d;
    bit se, de;
    int st;
    for (int i = 0; i < 16; i++) begin
      cpu_access(0, 4'(i), 8'h00, d, se, de, st);
      if (exp_bad[i]) check(de && !se, $sformatf("word %0d double error flagged", i));
      else check(d == exp_mem[i] && !de, $sformatf("word %0d = %02h, expected %02h", i, d, exp_mem[i]));
      if (se) m_cpu_corr++;
    end
  endtask

  initial begin
    logic [7:0] d, st;
    bit se, de;
    int stalls;
    dma_req = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    cpu_mem_req = 0; cpu_mem_we = 0; cpu_mem_addr = 0; cpu_mem_wdata = 0;
    cur_word = 8'h5a; word_idx = 0; cur_base = 0; inj_idx = -1; inj_mask = '0;
    {m_single, m_burst, m_start_reg, m_start_pin, m_corr, m_cpu_corr, m_double} = '0;
    {m_cpu_stall, m_addr_err, m_mode_err, m_b2b, m_irq, m_irq_masked} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // CPU fills the memory with known data through the encoder
    for (int i = 0; i < 16; i++) begin
      exp_mem[i] = 8'($urandom); exp_bad[i] = 0;
      cpu_access(1, 4'(i), exp_mem[i], d, se, de, stalls);
    end
    cpu_check_all();

    transfer(MODE_SINGLE, 4'd3, 0, -1, '0, 1, 0, 0);
    transfer(MODE_BURST,  4'd4, 1, -1, '0, 4, 0, 0);
    transfer(MODE_BURST,  4'd8, 0, 2, 13'h0040, 4, 0, 0);   // single flip, word 2
    transfer(MODE_SINGLE, 4'd0, 1, 0, 13'h0001, 1, 0, 0);   // overall parity bit flipped
    transfer(MODE_BURST,  4'd12, 1, 1, 13'h0300, 4, 0, 0);  // double flip, word 1
    transfer(MODE_SINGLE, 4'd1, 0, 0, 13'h1000, 1, 0, 0);   // single flip of the top bit
    cpu_check_all();
    transfer(MODE_BURST,  4'd14, 0, -1, '0, 0, 1, 0);       // would run past word 15
    transfer(MODE_NONE,   4'd0, 1, -1, '0, 0, 0, 1);
    transfer(MODE_RSVD,   4'd0, 0, -1, '0, 0, 0, 1);

    // CPU held off while a burst owns the memory
    csr_wr(CSR_STATUS, 8'hff);
    csr_wr(CSR_ADDR, 8'd6);
    cur_base = 4'd6;
    clear_counts();
    csr_wr(CSR_CTRL, {1'b1, 4'b0, 1'b1, MODE_BURST});
    wait (dma_ack == 1);
    cpu_access(0, 4'd2, 8'h00, d, se, de, stalls);
    check(stalls > 0, "CPU waited for the DMA");
    check(n_chk == 4 && dma_state == S_IDLE, "CPU granted only after the transfer");
    if (stalls > 0) m_cpu_stall++;
    check(d == exp_mem[2] || exp_bad[2], "CPU read after stall");
    for (int i = 0; i < 4; i++)
      check(chk_q[i] == exp_mem[6 + i], $sformatf("read-back word %0d during CPU stall", i));
    cpu_check_all();

    // back-to-back: request pin held high across two transfers
    csr_wr(CSR_STATUS, 8'hff);
    csr_wr(CSR_ADDR, 8'd0);
    cur_base = 4'd0;
    csr_wr(CSR_CTRL, {5'b0, 1'b1, MODE_BURST});
    clear_counts();
    @(negedge clk); dma_req = 1;
    wait (n_done == 1);
    wait (dma_ack == 1);
    @(negedge clk); dma_req = 0;
    wait (n_done == 2);
    wait (dma_state == S_IDLE);
    @(negedge clk);
    check(n_strobes == 8 && n_chk == 8, "two bursts back to back");
    if (n_done == 2) m_b2b++;
    for (int i = 0; i < 4; i++)
      check(chk_q[4 + i] == exp_mem[i], $sformatf("second burst read-back word %0d", i));

    // interrupt masking
    csr_wr(CSR_CTRL, {5'b0, 1'b0, MODE_BURST});
    check(irq == 0, "irq masked while done is set");
    csr_rd(CSR_STATUS, st);
    check(st[ST_DONE] == 1, "done stays set while masked");
    if (!irq && st[ST_DONE]) m_irq_masked++;
    csr_wr(CSR_STATUS, 8'hff);

    cpu_check_all();

    $display("mechanisms: single=%0d burst=%0d start_reg=%0d start_pin=%0d corrected=%0d cpu_corrected=%0d double=%0d",
             m_single, m_burst, m_start_reg, m_start_pin, m_corr, m_cpu_corr, m_double);
    $display("mechanisms: cpu_stall=%0d addr_err=%0d mode_err=%0d back_to_back=%0d irq=%0d irq_masked=%0d",
             m_cpu_stall, m_addr_err, m_mode_err, m_b2b, m_irq, m_irq_masked);
    check(m_single > 0, "single transfer happened");
    check(m_burst > 0, "burst transfer happened");
    check(m_start_reg > 0 && m_start_pin > 0, "both request sources used");
    check(m_corr > 0 && m_cpu_corr > 0, "single error corrected");
    check(m_double > 0, "double error detected");
    check(m_cpu_stall > 0, "CPU stall happened");
    check(m_addr_err > 0, "address error happened");
    check(m_mode_err > 0, "mode error happened");
    check(m_b2b > 0, "back-to-back requests happened");
    check(m_irq > 0 && m_irq_masked > 0, "interrupt raised and masked");
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
