// tb_wb2ahbl_bridge: Wishbone master in the testbench -> bridge -> AHB-Lite
// flash model (ahbl_envm_model, 2 wait states).
// Checks, per transfer: read data, exactly one NONSEQ address phase, HSIZE
// and aligned HADDR for every byte-select pattern, HBURST=000, HPROT=0000,
// HWRITE, and that ack comes WAIT+1 cycles after the strobe rises; writes
// end in err_o. Upsets of single stb_dl copies during transfers must not
// change any of this (TMR).
module tb_wb2ahbl_bridge;
  localparam int unsigned WAIT = 2;
  logic clk = 0, rst_n = 0;
  logic cyc = 0, stb = 0, we = 0;
  logic [31:0] adr = 0, dat_w = 0, dat_r;
  logic [3:0] sel = 0;
  logic ack, err;
  logic [31:0] haddr, hwdata, hrdata;
  logic hwrite, hready, hresp;
  logic [1:0] htrans;
  logic [2:0] hsize, hburst, seu = 0;
  logic [3:0] hprot;
  int checks = 0, failures = 0, nonseq = 0;

  always #5 clk = ~clk;

  wb2ahbl_bridge dut (.hclk(clk), .hresetn(rst_n), .cyc_i(cyc), .stb_i(stb), .we_i(we),
    .addr_i(adr), .data_i(dat_w), .sel_i(sel), .data_o(dat_r), .ack_o(ack), .err_o(err),
    .haddr(haddr), .hwrite(hwrite), .htrans(htrans), .hsize(hsize), .hburst(hburst),
    .hprot(hprot), .hwdata(hwdata), .hrdata(hrdata), .hready(hready), .hresp(hresp), .seu_i(seu));

  ahbl_envm_model #(.WAIT(WAIT)) u_mem (.hclk(clk), .hresetn(rst_n), .haddr(haddr), .hwrite(hwrite),
    .htrans(htrans), .hsize(hsize), .hwdata(hwdata), .hrdata(hrdata), .hready(hready), .hresp(hresp));

  always @(posedge clk) if (htrans == 2'b10 && hready) begin
    nonseq++;
    checks++; if (hburst !== 3'b000 || hprot !== 4'b0000) begin failures++; $display("FAIL hburst/hprot"); end
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic xfer(logic w, logic [31:0] a, logic [3:0] s, logic [2:0] exp_size,
                      logic [31:0] exp_addr, bit upset);
    int n = 0, ns0;
    ns0 = nonseq;
    @(negedge clk); cyc = 1; stb = 1; we = w; adr = a; sel = s; dat_w = $urandom;
    #1;
    chk("hsize", hsize, exp_size); chk("haddr", haddr, exp_addr); chk("hwrite", hwrite, w);
    chk("htrans nonseq", htrans, 2'b10);
    if (upset) seu = 3'(1) << $urandom_range(2);
    while (!(ack || err)) begin
      @(negedge clk); seu = 0; n++;
      if (n > 50) break;
    end
    if (w) chk("write error", err, 1);
    else begin
      chk("ack latency", n, WAIT + 1);
      chk("rdata", dat_r, {exp_addr[31:2], 2'b00} ^ 32'h0F1E_2D3C);
    end
    cyc = 0; stb = 0;
    repeat (3) @(negedge clk);
    chk("one address phase", nonseq - ns0, 1);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] a;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      a = 32'h6000_0000 + 32'($urandom_range(32'hFFFF));
      xfer(1'b0, a, 4'b1111, 3'b010, {a[31:2], 2'b00}, t % 2 == 1);
      xfer(1'b0, a, 4'b0011, 3'b001, {a[31:1], 1'b0}, 1'b0);
      xfer(1'b0, a, 4'b1100, 3'b001, {a[31:1], 1'b0}, 1'b0);
      xfer(1'b0, a, 4'b0001 << (t % 4), 3'b000, a, t % 3 == 0);
    end
    xfer(1'b1, 32'h6000_0010, 4'b1111, 3'b010, 32'h6000_0010, 1'b0);
    xfer(1'b0, 32'h6000_0014, 4'b1111, 3'b010, 32'h6000_0014, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
