// tb_bus_keeper: a device answers after L cycles (L = 1..15 must pass
// untouched, no answer must end in the keeper's err exactly 15 cycles after
// stb, together with timeout_o). Device errors and timeouts set the fault
// flag (bit 31) with type bit 0 = 0 / 1; reading the control register
// returns that value one cycle later and clears the flag. Single-copy upsets
// of the keeper state are injected during the waits (TMR).
module tb_bus_keeper;
  import ecc_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0;
  bus_req_t req = '0;
  bus_rsp_t dev = '0, rsp;
  logic tmo, fault;
  logic [2:0] seu = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bus_keeper dut (.clk(clk), .rst_n(rst_n), .req_i(req), .dev_rsp_i(dev), .sel_i(sel),
    .rsp_o(rsp), .timeout_o(tmo), .fault_o(fault), .seu_i(seu));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // request answered by the device after lat cycles (lat = 0: never);
  // returns the cycle (after stb) at which the keeper raised err, or 0
  task automatic access(int lat, bit dev_err, output int err_at);
    err_at = 0;
    @(negedge clk); req.stb = 1; req.addr = 32'h6000_0000;
    for (int c = 1; c <= 20; c++) begin
      @(negedge clk); req.stb = 0; dev = '0;
      seu = (c == 5) ? 3'(1) << $urandom_range(2) : 3'b0;
      if (c == lat) begin dev.ack = !dev_err; dev.err = dev_err; end
      #1;
      if (rsp.err && err_at == 0) begin
        err_at = c;
        chk("timeout_o with err", tmo, 1);
      end
    end
    dev = '0; seu = 0;
  endtask

  task automatic read_reg(logic [31:0] exp);
    @(negedge clk); sel = 1; req.stb = 1; req.rw = 0; req.addr = BUSKEEPER_ADDR;
    @(negedge clk); sel = 0; req.stb = 0;
    chk("reg ack", rsp.ack, 1); chk("reg value", rsp.data, exp);
    @(negedge clk);
    chk("flag cleared", fault, 0);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int at;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int l = 1; l <= 15; l++) begin
      access(l, 1'b0, at);
      chk("answered in time", at, 0);
      chk("no fault", fault, 0);
    end
    access(16, 1'b0, at);  chk("late answer times out", at, 15);
    chk("fault flag", fault, 1);
    read_reg(32'h8000_0001);
    access(0, 1'b0, at);   chk("no answer times out", at, 15);
    read_reg(32'h8000_0001);
    read_reg(32'h0000_0001);
    access(3, 1'b1, at);   chk("device error passes", at, 0);
    chk("device fault flag", fault, 1);
    read_reg(32'h8000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
