// ecc_memory: single-port codeword store.
//
// DEPTH words of CW_W bits (default 16 x 13: sixteen SECDED-protected bytes).
// A write (we high) stores wdata at addr on the rising clock edge; the read
// port is asynchronous, rdata = mem[addr] in the same cycle, as a small
// distributed (LUT) RAM on an FPGA would provide. That lets the syndrome
// checker look at a word in the cycle it is addressed, so a read-back check
// takes one cycle per word. The memory holds no reset: contents are
// undefined until written, as in a real RAM.
//
// The design description only says that ECC codewords are written to and
// read back from memory; depth, port count and read timing are choices of
// this implementation.
module ecc_memory #(
  parameter int unsigned CW_W   = 13,
  parameter int unsigned ADDR_W = 4,
  localparam int unsigned DEPTH = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [CW_W-1:0]   wdata,
  output logic [CW_W-1:0]   rdata
);

  logic [CW_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
