// tb_tmr_voter: exhaustive check of the 2-of-3 majority voter on 4-bit
// vectors: every combination of the three copies is compared with a
// per-bit count of ones (output 1 when two or more copies are 1), and the
// mismatch flag with "not all three equal".
module tb_tmr_voter;
  logic [3:0] a, b, c, y;
  logic       mm;
  int checks = 0, failures = 0;

  tmr_voter #(.WIDTH(4)) dut (.a(a), .b(b), .c(c), .y(y), .mismatch(mm));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      logic [3:0] e;
      {a, b, c} = 12'(i); #1;
      for (int k = 0; k < 4; k++) e[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++; if (y !== e) begin failures++; $display("FAIL vote %b %b %b -> %b", a, b, c, y); end
      checks++; if (mm !== !(a == b && b == c)) begin failures++; $display("FAIL mismatch %b %b %b", a, b, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
