// tb_ecc_counters: drives random event patterns into the four ECC counters
// and compares every cycle with reference counts kept in the testbench;
// checks that a clear empties all four and that a narrow counter wraps.
module tb_ecc_counters;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [3:0] ev = '0;
  logic [31:0] c0, c1, c2, c3;
  logic [3:0]  n0, n1, n2, n3;
  int unsigned r [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_counters dut (.clk(clk), .rst_n(rst_n), .clr_i(clr),
    .dmem_single_i(ev[0]), .dmem_double_i(ev[1]), .rf_single_i(ev[2]), .rf_double_i(ev[3]),
    .dmem_single_cnt(c0), .dmem_double_cnt(c1), .rf_single_cnt(c2), .rf_double_cnt(c3));
  ecc_counters #(.WIDTH(4)) dutn (.clk(clk), .rst_n(rst_n), .clr_i(clr),
    .dmem_single_i(ev[0]), .dmem_double_i(ev[1]), .rf_single_i(ev[2]), .rf_double_i(ev[3]),
    .dmem_single_cnt(n0), .dmem_double_cnt(n1), .rf_single_cnt(n2), .rf_double_cnt(n3));

  task automatic cmp();
    checks++;
    if ({c0, c1, c2, c3} !== {r[0], r[1], r[2], r[3]}) begin
      failures++; $display("FAIL counts %0d %0d %0d %0d exp %0d %0d %0d %0d", c0, c1, c2, c3, r[0], r[1], r[2], r[3]);
    end
    checks++;
    if ({n0, n1, n2, n3} !== {4'(r[0]), 4'(r[1]), 4'(r[2]), 4'(r[3])}) begin
      failures++; $display("FAIL narrow counts");
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) r[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cmp();
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t == 500) begin
        clr = 1; ev = 4'($urandom);
        for (int i = 0; i < 4; i++) r[i] = 0;
      end else begin
        clr = 0; ev = 4'($urandom);
        for (int i = 0; i < 4; i++) r[i] += ev[i];
      end
      @(posedge clk); #1;
      cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
