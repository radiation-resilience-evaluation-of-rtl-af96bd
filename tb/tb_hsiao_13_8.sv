// tb_hsiao_13_8: self-checking test of the Hsiao (13,8) encoder and decoder.
//
// The encoder output goes through an XOR with an error-injection vector into
// the decoder, as in the usual encoder/decoder loop test. Checks:
//  * the six points of the reference waveform of this code (data 0 and 0xCE,
//    no error, single error on d0/d7, double error on d0+d1 / d7+d3): exact
//    codeword, syndrome, error flags and output;
//  * all 256 data values: clean decode, every one of the 13 single-bit errors
//    corrected with the flipped position's column as syndrome, every one of the
//    78 double-bit errors flagged as double.
// The expected check bits are computed from a column table written out here,
// independently of the masks in the RTL package.
module tb_hsiao_13_8;
  logic [7:0]  din;
  logic [12:0] enc, inj, dec_in;
  logic [7:0]  dout;
  logic [4:0]  syn;
  logic [1:0]  err;
  int checks = 0, failures = 0;

  // syndrome column of each codeword position (d0..d7, then c0..c4)
  localparam logic [4:0] COL [13] = '{5'b01101, 5'b11001, 5'b00111, 5'b10011,
                                      5'b10110, 5'b11010, 5'b11100, 5'b01110,
                                      5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b10000};

  hsiao_enc_13_8 u_enc (.enc_in(din), .enc_out(enc));
  assign dec_in = enc ^ inj;
  hsiao_dec_13_8 u_dec (.dec_in(dec_in), .dec_out(dout), .dec_syndrome_out(syn), .dec_errorout(err));

  function automatic logic [4:0] ref_chk(logic [7:0] d);
    logic [4:0] c = '0;
    for (int j = 0; j < 8; j++) if (d[j]) c ^= COL[j];
    return c;
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h (din=%h inj=%b)", what, got, exp, din, inj);
    end
  endtask

  task automatic apply(logic [7:0] d, logic [12:0] e);
    din = d; inj = e; #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference waveform points
    apply(8'h00, 13'b0);             chk("ref0 enc", enc, 0); chk("ref0 err", err, 0);
    apply(8'h00, 13'b1);             chk("ref1 syn", syn, 5'b01101); chk("ref1 err", err, 2'b01); chk("ref1 d", dout, 0);
    apply(8'h00, 13'b11);            chk("ref2 syn", syn, 5'b10100); chk("ref2 err", err, 2'b10); chk("ref2 d", dout, 8'h03);
    apply(8'hCE, 13'b0);             chk("ref3 enc", enc, 13'b1111111001110); chk("ref3 err", err, 0); chk("ref3 d", dout, 8'hCE);
    apply(8'hCE, 13'b0000010000000); chk("ref4 syn", syn, 5'b01110); chk("ref4 err", err, 2'b01); chk("ref4 d", dout, 8'hCE);
    apply(8'hCE, 13'b0000010001000); chk("ref5 syn", syn, 5'b11101); chk("ref5 err", err, 2'b10); chk("ref5 d", dout, 8'h46);
    // exhaustive
    for (int d = 0; d < 256; d++) begin
      apply(8'(d), '0);
      chk("enc", enc, {ref_chk(8'(d)), 8'(d)});
      chk("clean", {err, syn, dout}, {2'b00, 5'b0, 8'(d)});
      for (int i = 0; i < 13; i++) begin
        apply(8'(d), 13'(1) << i);
        chk("single", {err, syn, dout}, {2'b01, COL[i], 8'(d)});
        for (int k = i + 1; k < 13; k++) begin
          apply(8'(d), (13'(1) << i) | (13'(1) << k));
          chk("double", {err, syn}, {2'b10, COL[i] ^ COL[k]});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
