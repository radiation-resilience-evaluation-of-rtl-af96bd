// tb_bus_switch: two random masters (data port A, fetch port B) share one
// slave with random latency. Each master checks that it gets exactly one
// response per request with the data belonging to its own address. When both
// request in the same cycle on a free bus, the forwarded request must be A's
// (data first) and conflict_o must be high; B must be served afterwards.
// Single-copy upsets of the switch state are injected now and then (TMR).
module tb_bus_switch;
  import ecc_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t ra = '0, rb = '0, m;
  bus_rsp_t sa, sb, ms;
  logic conflict;
  logic [2:0] seu = 0;
  int checks = 0, failures = 0, n_a = 0, n_b = 0, n_conf = 0, n_prio = 0;

  always #5 clk = ~clk;

  bus_switch dut (.clk(clk), .rst_n(rst_n), .ca_req_i(ra), .ca_rsp_o(sa), .cb_req_i(rb), .cb_rsp_o(sb),
    .m_req_o(m), .m_rsp_i(ms), .conflict_o(conflict), .seu_i(seu));

  // slave: answers each request 1..4 cycles after its stb with addr ^ constant
  initial begin
    ms = '0;
    forever begin
      @(posedge clk);
      if (m.stb) begin
        logic [31:0] a;
        a = m.addr;
        repeat ($urandom_range(3)) @(posedge clk);
        #1 ms.ack = 1; ms.data = a ^ 32'h1234_5678;
        @(posedge clk);
        #1 ms = '0;
      end
    end
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // same-cycle requests on an idle bus: A must win
  always @(posedge clk) if (rst_n && ra.stb && rb.stb && m.stb && conflict) begin
    n_prio++;
    chk("data first", m.addr, ra.addr);
  end
  always @(posedge clk) if (conflict) n_conf++;

  // upset one copy of the state every 37 cycles
  always @(negedge clk) seu <= ($time % 370 == 0) ? 3'(1) << $urandom_range(2) : 3'b0;

  task automatic master_a();
    for (int t = 0; t < 300; t++) begin
      int n = 0;
      repeat ($urandom_range(2)) @(negedge clk);
      @(negedge clk); ra.stb = 1; ra.addr = $urandom; ra.rw = 0;
      @(negedge clk); ra.stb = 0;
      while (!sa.ack) begin @(negedge clk); if (++n > 100) break; end
      chk("A data", sa.data, ra.addr ^ 32'h1234_5678); n_a++;
      @(negedge clk); chk("A single response", sa.ack, 0);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    fork
      master_a();
      for (int t = 0; t < 300; t++) begin
        int n;
        n = 0;
        repeat ($urandom_range(2)) @(negedge clk);
        @(negedge clk); rb.stb = 1; rb.addr = $urandom; rb.rw = 0;
        // response may come in the stb cycle's next edge at the earliest
        @(negedge clk); rb.stb = 0;
        while (!sb.ack) begin @(negedge clk); if (++n > 100) break; end
        chk("B data", sb.data, rb.addr ^ 32'h1234_5678); n_b++;
      end
    join
    chk("A served", n_a, 300); chk("B served", n_b, 300);
    checks++; if (n_prio == 0 || n_conf == 0) begin failures++; $display("FAIL no same-cycle conflict seen"); end
    $display("conflicts=%0d", n_prio);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
