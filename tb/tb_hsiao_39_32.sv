// tb_hsiao_39_32: self-checking test of the Hsiao (39,32) encoder and decoder.
//
// Encoder -> XOR error injection -> decoder. The expected check bits come
// from a column table built here from its definition (weight-3 columns of 7
// bits in lexicographic order, without {0,1,2}, {0,3,4}, {1,5,6}), not from
// the RTL masks. The table itself is checked against Hsiao's rules (odd,
// distinct, non-zero columns; row weights within one of each other). For 300
// random words and corner values: clean decode, all 39 single-bit errors
// corrected with the right syndrome, and 60 random double-bit errors flagged
// as double.
module tb_hsiao_39_32;
  logic [31:0] din, dout;
  logic [38:0] enc, inj;
  logic [6:0]  syn;
  logic [1:0]  err;
  logic [6:0]  col [39];
  int checks = 0, failures = 0;

  hsiao_enc_39_32 u_enc (.enc_in(din), .enc_out(enc));
  hsiao_dec_39_32 u_dec (.dec_in(enc ^ inj), .dec_out(dout), .dec_syndrome_out(syn), .dec_errorout(err));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h (din=%h inj=%h)", what, got, exp, din, inj);
    end
  endtask

  function automatic logic [6:0] ref_chk(logic [31:0] d);
    logic [6:0] c = '0;
    for (int j = 0; j < 32; j++) if (d[j]) c ^= col[j];
    return c;
  endfunction

  task automatic one_word(logic [31:0] d);
    din = d; inj = '0; #1;
    chk("enc", enc, {ref_chk(d), d});
    chk("clean", {err, syn, dout}, {2'b00, 7'b0, d});
    for (int i = 0; i < 39; i++) begin
      inj = 39'(1) << i; #1;
      chk("single", {err, syn, dout}, {2'b01, col[i], d});
    end
    for (int n = 0; n < 2; n++) begin
      int a, b;
      a = $urandom_range(38); b = (a + 1 + $urandom_range(37)) % 39;
      inj = (39'(1) << a) | (39'(1) << b); #1;
      chk("double", {err, syn}, {2'b10, col[a] ^ col[b]});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    int roww [7];
    for (int a = 0; a < 7; a++)
      for (int b = a + 1; b < 7; b++)
        for (int c = b + 1; c < 7; c++) begin
          if ((a == 0 && b == 1 && c == 2) || (a == 0 && b == 3 && c == 4) || (a == 1 && b == 5 && c == 6)) continue;
          col[n] = 7'((1 << a) | (1 << b) | (1 << c));
          n++;
        end
    for (int k = 0; k < 7; k++) col[32 + k] = 7'(1 << k);
    chk("columns", n, 32);
    for (int k = 0; k < 7; k++) roww[k] = 0;
    for (int j = 0; j < 32; j++) begin
      chk("odd column", $countones(col[j]) % 2, 1);
      for (int k = 0; k < 7; k++) roww[k] += col[j][k];
      for (int i = 0; i < j; i++) chk("distinct", col[i] == col[j], 0);
    end
    for (int k = 0; k < 7; k++) chk("row weight", (roww[k] >= 13 && roww[k] <= 14), 1);

    one_word(32'h0); one_word(32'hFFFF_FFFF); one_word(32'h8010_0898);
    for (int t = 0; t < 300; t++) one_word($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
