// tb_ecc_dmem: checks the byte-lane ECC data memory through its bus port.
//  * word, half-word and byte stores at random addresses over the whole
//    16 KB, loads compared with a byte-wise reference memory; every access is
//    acknowledged exactly one cycle after its stb;
//  * stores with one flipped bit per lane (inj_i): loads still return the
//    right data and single_o pulses once per load;
//  * stores with two flipped bits: double_o pulses, the returned lane holds
//    the stored bits unchanged;
//  * a scrubbing pass (load + store back) removes single errors;
//  * a byte store into a word with a corrupted neighbour lane leaves the
//    neighbour's error in place (lanes are independent).
module tb_ecc_dmem;
  import ecc_pkg::*;
  logic clk = 0, rst_n = 0, sel = 1;
  bus_req_t req;
  bus_rsp_t rsp;
  logic [12:0] inj = '0;
  logic s, dbl;
  logic [7:0] model [DMEM_SIZE];
  int checks = 0, failures = 0, n_s = 0, n_d = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin n_s += s; n_d += dbl; end

  ecc_dmem dut (.clk(clk), .rst_n(rst_n), .sel_i(sel), .req_i(req), .rsp_o(rsp),
    .inj_i(inj), .single_o(s), .double_o(dbl));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic access(logic rw, logic [31:0] addr, logic [3:0] ben, logic [31:0] wdata,
                        output logic [31:0] rdata);
    @(negedge clk);
    req.stb = 1; req.rw = rw; req.addr = addr; req.ben = ben; req.data = wdata;
    @(negedge clk); req.stb = 0;
    chk("ack after one cycle", rsp.ack, 1);
    rdata = rsp.data;
    @(negedge clk);
    chk("single ack", rsp.ack, 0);
    if (rw) for (int l = 0; l < 4; l++) if (ben[l]) model[{addr[13:2], 2'(l)}] = wdata[8*l +: 8];
  endtask

  function automatic logic [31:0] mword(logic [13:0] a);
    return {model[{a[13:2], 2'd3}], model[{a[13:2], 2'd2}], model[{a[13:2], 2'd1}], model[{a[13:2], 2'd0}]};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] rd, a;
    logic [3:0] ben;
    int kind;
    req = '0;
    for (int i = 0; i < DMEM_SIZE; i++) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      a = DMEM_BASE + 32'($urandom_range(DMEM_SIZE - 1));
      kind = $urandom_range(2);
      case (kind)
        0: begin a[1:0] = 0; ben = 4'b1111; end
        1: begin a[0] = 0; ben = a[1] ? 4'b1100 : 4'b0011; end
        default: ben = 4'b0001 << a[1:0];
      endcase
      access(1'b1, a, ben, $urandom, rd);
      access(1'b0, {a[31:2], 2'b00}, 4'b1111, 0, rd);
      chk("load", rd, mword(a[13:0]));
    end
    chk("no spurious errors", n_s + n_d, 0);
    // single errors
    for (int t = 0; t < 50; t++) begin
      a = DMEM_BASE + {18'b0, 12'($urandom), 2'b00};
      inj = 13'(1) << $urandom_range(12);
      access(1'b1, a, 4'b1111, $urandom, rd);
      inj = '0;
      access(1'b0, a, 4'b1111, 0, rd);
      chk("corrected", rd, mword(a[13:0]));
    end
    chk("single count", n_s, 50);
    // scrub the last word written: load and store back, then reload clean
    access(1'b0, a, 4'b1111, 0, rd);
    access(1'b1, a, 4'b1111, rd, rd);
    n_s = 0;
    access(1'b0, a, 4'b1111, 0, rd);
    chk("scrubbed", n_s, 0);
    // double errors
    a = DMEM_BASE + 32'h100;
    inj = 13'b0000000000011;
    access(1'b1, a, 4'b0001, 32'h0000_0000, rd);
    inj = '0;
    access(1'b0, a, 4'b1111, 0, rd);
    chk("double flag", n_d, 1);
    chk("double raw data", rd[7:0], 8'h03);
    // byte store next to a corrupted lane: error stays in lane 0
    access(1'b1, a, 4'b0010, 32'h0000_AB00, rd);
    access(1'b0, a, 4'b1111, 0, rd);
    chk("lanes independent", n_d, 2);
    chk("byte lane 1", rd[15:8], 8'hAB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
