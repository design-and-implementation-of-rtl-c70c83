// ecc_syndrome: SECDED syndrome generator and correction logic.
//
// Takes a codeword read from memory (layout as in ecc_encoder), recomputes
// every Hamming check bit over the received bits and forms the syndrome; a
// non-zero syndrome is the position of a flipped bit. The overall parity of
// all bits separates the cases:
//   syndrome 0, parity even      : no error
//   parity odd                   : single error, the bit at the syndrome
//                                  position is inverted (syndrome 0 means the
//                                  overall parity bit itself flipped)
//   syndrome non-zero, parity even: double error, flagged, data not trusted
// A syndrome that points beyond the codeword can only come from several
// flipped bits and is reported as a double (uncorrectable) error too.
//
// Purely combinational; data_out is the corrected data word.
//
// Syndrome formation, inversion of the indicated bit and flagging of double
// errors follow the design description; the exact code layout and the
// out-of-range rule are this implementation's choices.
module ecc_syndrome
  import dma_pkg::*;
#(
  parameter int unsigned DATA_W = dma_pkg::DEF_DATA_W,
  localparam int unsigned P     = ecc_parity_bits(DATA_W),
  localparam int unsigned CW_W  = ecc_cw_w(DATA_W)
) (
  input  logic [CW_W-1:0]   codeword,
  output logic [DATA_W-1:0] data_out,
  output logic [P-1:0]      syndrome,
  output logic              single_err,  // single error found and corrected
  output logic              double_err   // uncorrectable error
);

  logic overall;

  always_comb begin
    for (int unsigned i = 0; i < P; i++) begin
      syndrome[i] = 1'b0;
      for (int unsigned pos = 1; pos < CW_W; pos++)
        if (((pos >> i) & 1) != 0) syndrome[i] ^= codeword[pos];
    end
    overall = ^codeword;
  end

  always_comb begin
    logic [CW_W-1:0] fixed;
    int unsigned     j;
    fixed      = codeword;
    single_err = 1'b0;
    double_err = 1'b0;
    if (overall) begin
      if (int'(syndrome) < CW_W) begin
        single_err = 1'b1;
        fixed[syndrome] = ~codeword[syndrome];
      end else begin
        double_err = 1'b1;
      end
    end else if (syndrome != '0) begin
      double_err = 1'b1;
    end
    // Gather the data bits back from the non-power-of-two positions.
    data_out = '0;
    j = 0;
    for (int unsigned pos = 1; pos < CW_W; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data_out[j] = fixed[pos];
        j++;
      end
    end
  end

endmodule
