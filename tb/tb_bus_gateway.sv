// tb_bus_gateway: checks the address decode (DMEM window edges, bus keeper
// register word, everything else external) against a reference computed
// here, that exactly one select is high, and that the responses are OR-ed
// (rsp_o with, dev_rsp_o without the keeper).
module tb_bus_gateway;
  import ecc_pkg::*;
  bus_req_t req = '0;
  bus_rsp_t d = '0, k = '0, e = '0, dev, all;
  logic sd, sk, se;
  int checks = 0, failures = 0;

  bus_gateway dut (.req_i(req), .dmem_sel_o(sd), .bk_sel_o(sk), .ext_sel_o(se),
    .dmem_rsp_i(d), .bk_rsp_i(k), .ext_rsp_i(e), .dev_rsp_o(dev), .rsp_o(all));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h addr %h", what, got, exp, req.addr); end
  endtask

  task automatic probe(logic [31:0] a);
    logic in_dmem, is_bk;
    req.addr = a; #1;
    in_dmem = (a >= 32'h8000_0000) && (a <= 32'h8000_3FFF);
    is_bk   = (a >= 32'hFFFF_FF78) && (a <= 32'hFFFF_FF7B);
    chk("dmem sel", sd, in_dmem); chk("bk sel", sk, is_bk); chk("ext sel", se, !in_dmem && !is_bk);
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (probe_list[i]) probe(probe_list[i]);
    for (int t = 0; t < 3000; t++) begin
      probe($urandom);
      probe(32'h8000_0000 + 32'($urandom_range(32'h7FFF)));
      probe(32'hFFFF_FF00 + 32'($urandom_range(255)));
    end
    for (int t = 0; t < 200; t++) begin
      d = $urandom; k = $urandom; e = $urandom; #1;
      chk("rsp or", all, d | k | e); chk("dev or", dev, d | e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] probe_list [8] = '{32'h7FFF_FFFF, 32'h8000_0000, 32'h8000_3FFF, 32'h8000_4000,
                                  32'hFFFF_FF77, 32'hFFFF_FF78, 32'hFFFF_FF7C, 32'h6000_0000};
endmodule
