// tb_req_sync: the request synchroniser delays its input by exactly
// STAGES clock cycles and clears on reset. Random input levels are driven
// between clock edges and compared with a delayed copy kept by the
// testbench.
module tb_req_sync;
  logic clk = 0, rst_n = 0, async_in = 0, sync_out;
  logic hist [$];
  int checks = 0, failures = 0;

  req_sync #(.STAGES(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (sync_out !== 1'b0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    hist = '{1'b0, 1'b0};
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      checks++;
      if (sync_out !== hist[0]) begin
        failures++;
        $display("FAIL cycle %0d: out=%b exp=%b", n, sync_out, hist[0]);
      end
      async_in = 1'($urandom);
      void'(hist.pop_front());
      hist.push_back(async_in);
      // the value driven now is captured at the next rising edge
      @(posedge clk);
    end
    @(negedge clk);
    rst_n = 0; #1;
    checks++;
    if (sync_out !== 1'b0) begin failures++; $display("FAIL asynchronous reset"); end
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
