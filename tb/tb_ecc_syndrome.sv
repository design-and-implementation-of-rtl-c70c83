// tb_ecc_syndrome: exhaustive check of the SECDED checker for 8-bit data.
//
// For every data word the reference codeword (same layout as the encoder:
// Hamming(12,8) positions plus overall parity at bit 0) is fed in clean,
// with each of the 13 single-bit flips and with each of the 78 double-bit
// flips. Expected: clean -> no flags, data intact, syndrome 0; single ->
// single_err, data corrected, syndrome = flipped position; double ->
// double_err only.
module tb_ecc_syndrome;
  logic [12:0] cw;
  logic [7:0]  dout;
  logic [3:0]  syn;
  logic        se, de;
  int checks = 0, failures = 0;

  ecc_syndrome #(.DATA_W(8)) dut (
    .codeword(cw), .data_out(dout), .syndrome(syn), .single_err(se), .double_err(de)
  );

  function automatic logic [12:0] ref_enc(input logic [7:0] d);
    logic [12:0] c;
    c = '0;
    c[3] = d[0]; c[5] = d[1]; c[6] = d[2]; c[7] = d[3];
    c[9] = d[4]; c[10] = d[5]; c[11] = d[6]; c[12] = d[7];
    c[1] = d[0] ^ d[1] ^ d[3] ^ d[4] ^ d[6];
    c[2] = d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
    c[4] = d[1] ^ d[2] ^ d[3] ^ d[7];
    c[8] = d[4] ^ d[5] ^ d[6] ^ d[7];
    c[0] = ^c[12:1];
    return c;
  endfunction

  task automatic expect_out(input logic [7:0] d, input logic [3:0] s,
                            input logic e_se, input logic e_de, input bit check_data,
                            input bit check_syn);
    checks++;
    if (se !== e_se || de !== e_de || (check_data && dout !== d) || (check_syn && syn !== s)) begin
      failures++;
      if (failures < 10)
        $display("FAIL cw=%013b dout=%02h exp=%02h syn=%0d exp=%0d se=%b de=%b",
                 cw, dout, d, syn, s, se, de);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [12:0] c;
      c = ref_enc(8'(i));
      cw = c; #1;
      expect_out(8'(i), 4'd0, 1'b0, 1'b0, 1, 1);
      for (int b = 0; b < 13; b++) begin
        cw = c ^ (13'd1 << b); #1;
        expect_out(8'(i), 4'(b), 1'b1, 1'b0, 1, 1);
      end
      for (int b = 0; b < 13; b++)
        for (int b2 = b + 1; b2 < 13; b2++) begin
          cw = c ^ (13'd1 << b) ^ (13'd1 << b2); #1;
          expect_out(8'(i), 4'(b ^ b2), 1'b0, 1'b1, 0, 0);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
