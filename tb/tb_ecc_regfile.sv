// tb_ecc_regfile: checks the ECC register file against a reference array.
//  * random writes and dual reads: read data one cycle after the address,
//    x0 always zero and never written;
//  * a write with one injected bit flip: both read ports return the correct
//    value, flag a single error, and the single-error event fires (only when
//    ren was high);
//  * a write with two flipped bits: flagged as double on both ports;
//  * a clean rewrite clears the error.
module tb_ecc_regfile;
  logic clk = 0;
  logic ren = 0, we = 0;
  logic [4:0] a1 = 0, a2 = 0, wa = 0;
  logic [31:0] wd = 0, r1, r2;
  logic [38:0] inj = '0;
  logic [1:0] e1, e2;
  logic s, dbl;
  logic [31:0] model [32];
  int checks = 0, failures = 0, n_single = 0, n_double = 0;

  always #5 clk = ~clk;

  ecc_regfile dut (.clk(clk), .ren(ren), .rs1_addr(a1), .rs2_addr(a2), .rd_we(we), .rd_addr(wa),
    .rd_data(wd), .inj_i(inj), .rs1_o(r1), .rs2_o(r2), .rs1_err(e1), .rs2_err(e2),
    .single_o(s), .double_o(dbl));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic write(logic [4:0] a, logic [31:0] d, logic [38:0] e);
    @(negedge clk); we = 1; wa = a; wd = d; inj = e;
    @(negedge clk); we = 0; inj = '0;
    if (a != 0) model[a] = d;
  endtask

  task automatic read(logic [4:0] x, logic [4:0] y, logic [1:0] ee, bit rd_en);
    @(negedge clk); a1 = x; a2 = y; ren = rd_en;
    @(posedge clk); #1;
    if (ee != 2'b10) begin chk("rs1", r1, model[x]); chk("rs2", r2, model[y]); end
    chk("err1", e1, (x == 0) ? 2'b00 : ee); chk("err2", e2, (y == 0) ? 2'b00 : ee);
    chk("single ev", s, rd_en && ee == 2'b01 && (x != 0 || y != 0));
    chk("double ev", dbl, rd_en && ee == 2'b10 && (x != 0 || y != 0));
    n_single += s; n_double += dbl;
    ren = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int t = 0; t < 300; t++) begin
      write(5'($urandom), $urandom, '0);
      read(5'($urandom), 5'($urandom), 2'b00, 1'b1);
    end
    write(5'd0, 32'hDEAD_BEEF, '0);
    read(5'd0, 5'd0, 2'b00, 1'b1);
    for (int t = 0; t < 40; t++) begin
      logic [4:0] r;
      r = 5'(1 + $urandom_range(30));
      write(r, $urandom, 39'(1) << $urandom_range(38));
      read(r, r, 2'b01, 1'b1);
      read(r, r, 2'b01, 1'b0);       // not counted without ren
      write(r, $urandom, 39'(3) << $urandom_range(37));
      read(r, 5'd0, 2'b10, 1'b1);
      write(r, model[r], '0);
      read(r, r, 2'b00, 1'b1);
    end
    chk("single events", n_single, 40);
    chk("double events", n_double, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
