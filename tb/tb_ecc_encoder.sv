// tb_ecc_encoder: exhaustive check of the SECDED encoder for 8-bit data.
//
// The reference code is written out from the classic Hamming(12,8) layout:
// data bits d0..d7 at codeword positions 3,5,6,7,9,10,11,12, check bit
// c_k at position 2**k covering every position with bit k set, and the
// overall parity at bit 0. All 256 data words are compared with it, and the
// minimum distance of the whole code is measured (must be 4 for SECDED).
module tb_ecc_encoder;
  logic [7:0]  data;
  logic [12:0] cw;
  int checks = 0, failures = 0;

  ecc_encoder #(.DATA_W(8)) dut (.data(data), .codeword(cw));

  function automatic logic [12:0] ref_enc(input logic [7:0] d);
    logic [12:0] c;
    c = '0;
    c[3] = d[0]; c[5] = d[1]; c[6] = d[2]; c[7] = d[3];
    c[9] = d[4]; c[10] = d[5]; c[11] = d[6]; c[12] = d[7];
    c[1] = d[0] ^ d[1] ^ d[3] ^ d[4] ^ d[6];          // positions 3,5,7,9,11
    c[2] = d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];          // positions 3,6,7,10,11
    c[4] = d[1] ^ d[2] ^ d[3] ^ d[7];                 // positions 5,6,7,12
    c[8] = d[4] ^ d[5] ^ d[6] ^ d[7];                 // positions 9..12
    c[0] = ^c[12:1];
    return c;
  endfunction

  logic [12:0] table_cw [256];

  initial begin
    int mind;
    for (int i = 0; i < 256; i++) begin
      data = 8'(i);
      #1;
      checks++;
      table_cw[i] = cw;
      if (cw !== ref_enc(8'(i))) begin
        failures++;
        $display("FAIL data=%02h cw=%013b exp=%013b", i, cw, ref_enc(8'(i)));
      end
    end
    mind = 99;
    for (int i = 0; i < 256; i++)
      for (int j = i + 1; j < 256; j++)
        if ($countones(table_cw[i] ^ table_cw[j]) < mind)
          mind = $countones(table_cw[i] ^ table_cw[j]);
    checks++;
    if (mind != 4) begin
      failures++;
      $display("FAIL minimum distance %0d, expected 4", mind);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
