// tb_tmr_reg: checks the triplicated register. It loads random values and
// compares q with a plain reference register; between loads it upsets one
// copy at a time (seu_i) and checks that q keeps the right value while
// mismatch shows the disagreement, and that the next load repairs the copy.
// Two simultaneous upsets must, by contrast, reach q (a TMR limit). Also
// checks the reset value and the TMR=0 single-copy build.
module tb_tmr_reg;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] d, q, q1, ref_q;
  logic [2:0] seu = '0;
  logic mm, mm1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tmr_reg #(.WIDTH(8), .RESET_VAL(8'h5A), .TMR(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .seu_i(seu), .q(q), .mismatch(mm));
  tmr_reg #(.WIDTH(8), .RESET_VAL(8'h5A), .TMR(1'b0)) dut1 (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .seu_i(3'b000), .q(q1), .mismatch(mm1));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = 0;
    repeat (2) @(posedge clk);
    chk("reset", q, 8'h5A); chk("reset1", q1, 8'h5A);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk); en = 1; d = 8'($urandom); ref_q = d;
      @(negedge clk); en = 0;
      chk("load", q, ref_q); chk("load1", q1, ref_q); chk("no mismatch", mm, 0);
      seu = 3'(1) << (t % 3);
      @(negedge clk); seu = 0;
      chk("masked upset", q, ref_q); chk("mismatch seen", mm, 1);
      @(negedge clk);
      chk("hold", q, ref_q);
    end
    // a load repairs the upset copy
    @(negedge clk); en = 1; d = 8'hC3;
    @(negedge clk); en = 0; chk("repair", mm, 0); chk("repair q", q, 8'hC3);
    // two copies upset: the voter follows the majority
    seu = 3'b011;
    @(negedge clk); seu = 0; chk("double upset", q, 8'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
