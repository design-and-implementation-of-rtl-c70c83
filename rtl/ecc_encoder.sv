// ecc_encoder: SECDED encoder for one data word.
//
// The data bits are placed at the non-power-of-two positions 1..N of an
// extended Hamming codeword (N = DATA_W + P). Each check bit at position 2**i
// is the XOR of every data bit whose position has bit i set. Bit 0 is the
// overall parity of positions 1..N, which lets the checker tell a single
// error (odd overall parity) from a double error (even overall parity with a
// non-zero syndrome). For the default 8-bit data this gives 4 Hamming check
// bits and a 13-bit codeword.
//
// Purely combinational: codeword follows data in the same cycle.
//
// XOR-based check bits over data-bit subsets and SECDED capability come from
// the design description; the exact bit placement (classic Hamming
// positions plus an overall parity bit at index 0) is this implementation's
// choice.
module ecc_encoder
  import dma_pkg::*;
#(
  parameter int unsigned DATA_W = dma_pkg::DEF_DATA_W,
  localparam int unsigned P     = ecc_parity_bits(DATA_W),
  localparam int unsigned CW_W  = ecc_cw_w(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CW_W-1:0]   codeword
);

  always_comb begin
    logic [CW_W-1:0] cw;
    int unsigned     j;
    cw = '0;
    j  = 0;
    // Scatter data bits over the non-power-of-two positions.
    for (int unsigned pos = 1; pos < CW_W; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        cw[pos] = data[j];
        j++;
      end
    end
    // Hamming check bits: parity positions are still zero here.
    for (int unsigned i = 0; i < P; i++) begin
      logic par;
      par = 1'b0;
      for (int unsigned pos = 1; pos < CW_W; pos++)
        if (((pos >> i) & 1) != 0) par ^= cw[pos];
      cw[1 << i] = par;
    end
    // Overall parity over positions 1..N.
    cw[0] = ^cw[CW_W-1:1];
    codeword = cw;
  end

endmodule
