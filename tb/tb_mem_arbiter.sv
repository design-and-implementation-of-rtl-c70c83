// tb_mem_arbiter: random request patterns from both masters.
//
// Expected behaviour, written independently: the DMA wins whenever it
// requests, the CPU is granted only when the DMA is silent, the memory
// port carries the granted master's signals and no write reaches memory
// without a grant. Counts how often the CPU was held off.
module tb_mem_arbiter;
  logic       dma_req, dma_we, dma_gnt, cpu_req, cpu_we, cpu_gnt, mem_we;
  logic [3:0] dma_addr, cpu_addr, mem_addr;
  logic [7:0] dma_wdata, cpu_wdata, mem_wdata;
  int checks = 0, failures = 0, cpu_stalls = 0;

  mem_arbiter #(.DATA_W(8), .ADDR_W(4)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: dreq=%b creq=%b dgnt=%b cgnt=%b", what, dma_req, cpu_req, dma_gnt, cpu_gnt);
    end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      {dma_req, dma_we, cpu_req, cpu_we} = 4'($urandom);
      dma_addr = 4'($urandom); cpu_addr = 4'($urandom);
      dma_wdata = 8'($urandom); cpu_wdata = 8'($urandom);
      #1;
      check(dma_gnt == dma_req, "dma grant");
      check(cpu_gnt == (cpu_req && !dma_req), "cpu grant");
      if (dma_req) begin
        check(mem_we == dma_we && mem_addr == dma_addr && mem_wdata == dma_wdata, "dma port");
        if (cpu_req) cpu_stalls++;
      end else if (cpu_req) begin
        check(mem_we == cpu_we && mem_addr == cpu_addr && mem_wdata == cpu_wdata, "cpu port");
      end else begin
        check(mem_we == 1'b0, "idle port");
      end
      #1;
    end
    check(cpu_stalls > 0, "cpu stall seen");
    $display("cpu stalls: %0d", cpu_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
