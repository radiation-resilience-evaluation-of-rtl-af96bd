// tb_wb_ext_if: internal bus requests through the external interface to a
// Wishbone slave in the testbench with random latency. Checks that cyc/stb
// rise one cycle after the request, address/data/select/we stay stable
// until ack, the response carries the slave's read data, a slave err
// becomes a bus fault, abort_i ends a stuck cycle without a response, and
// cyc drops for at least one cycle between transfers. Single-copy upsets of
// the state register are injected while transfers are pending (TMR).
module tb_wb_ext_if;
  import ecc_pkg::*;
  logic clk = 0, rst_n = 0, abort = 0;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  logic cyc, stb, we, ack = 0, err = 0;
  logic [31:0] adr, dw, dr = 0;
  logic [3:0] sel;
  logic [2:0] seu = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wb_ext_if dut (.clk(clk), .rst_n(rst_n), .sel_i(1'b1), .req_i(req), .rsp_o(rsp), .abort_i(abort),
    .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we), .wb_adr_o(adr), .wb_dat_o(dw), .wb_sel_o(sel),
    .wb_dat_i(dr), .wb_ack_i(ack), .wb_err_i(err), .seu_i(seu));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // mode 0: ack, 1: err, 2: no answer (abort after 15 cycles)
  task automatic xfer(int mode);
    logic [31:0] a, d;
    logic [3:0] b;
    logic w;
    int lat;
    a = $urandom; d = $urandom; b = 4'($urandom); w = 1'($urandom); lat = 1 + $urandom_range(6);
    @(negedge clk); req.stb = 1; req.rw = w; req.addr = a; req.ben = b; req.data = d;
    chk("idle before", cyc, 0);
    @(negedge clk); req.stb = 0; req = '0;
    for (int c = 1; c <= 20; c++) begin
      chk("cyc held", {cyc, stb}, 2'b11);
      chk("fields held", {we, adr, dw, sel}, {w, a, d, b});
      seu = (c == 2) ? 3'(1) << $urandom_range(2) : 3'b0;
      if (mode == 0 && c == lat) begin ack = 1; dr = ~a; end
      if (mode == 1 && c == lat) err = 1;
      if (mode == 2 && c == 15) abort = 1;
      #1;
      if (ack) begin chk("ack", rsp.ack, 1); chk("rdata", rsp.data, w ? 32'h0 : dr); end
      if (err) chk("fault", rsp.err, 1);
      if (abort) chk("no response on abort", rsp.ack | rsp.err, 0);
      @(negedge clk);
      if (ack || err || abort) begin ack = 0; err = 0; abort = 0; seu = 0; break; end
    end
    chk("cyc dropped", cyc, 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) xfer(t % 10 == 9 ? 2 : (t % 10 == 8 ? 1 : 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
