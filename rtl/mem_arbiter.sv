// mem_arbiter: two-master arbiter for the codeword memory port.
//
// Master 0 is the DMA engine, master 1 the CPU. The DMA holds its request
// high for its whole transfer (acknowledge, writes and read-back) and has
// fixed priority, so once it owns the memory it is never interrupted and its
// transfer latency stays deterministic. A CPU request made while the DMA
// owns the memory is not granted; the CPU must hold it (wait state) until
// cpu_gnt is high. Grants are combinational, in the cycle of the request;
// the selected master's write enable, address and data drive the memory.
//
// The description calls only for a lightweight arbitration that lets the DMA
// reach memory without contention; the fixed-priority scheme and the CPU wait
// handshake are this implementation's choices.
module mem_arbiter #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 4
) (
  // DMA master
  input  logic              dma_req,
  input  logic              dma_we,
  input  logic [ADDR_W-1:0] dma_addr,
  input  logic [DATA_W-1:0] dma_wdata,
  output logic              dma_gnt,
  // CPU master
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [DATA_W-1:0] cpu_wdata,
  output logic              cpu_gnt,
  // memory side
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata
);

  always_comb begin
    dma_gnt = dma_req;
    cpu_gnt = cpu_req && !dma_req;
    if (dma_gnt) begin
      mem_we    = dma_we;
      mem_addr  = dma_addr;
      mem_wdata = dma_wdata;
    end else begin
      mem_we    = cpu_gnt && cpu_we;
      mem_addr  = cpu_addr;
      mem_wdata = cpu_wdata;
    end
  end

  // At most one master owns the memory in any cycle.
  always_comb assert (!(dma_gnt && cpu_gnt));

endmodule
