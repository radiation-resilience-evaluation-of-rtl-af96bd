// bus_switch: two-master multiplexer in front of the processor-internal bus.
//
// The CPU's instruction fetch port and data access port share one bus. A
// request (one-cycle stb) that cannot be granted at once is remembered as
// pending. When the bus is free, a data request (port A, new or pending) wins
// over an instruction fetch (port B), so loads and stores are never held up by
// a fetch that arrived in the same cycle. The granted master's stb is
// forwarded in the grant cycle; its address and data (held stable by the
// master) are passed on until the response (ack or err) returns, which is
// routed back to that master only. The bus is free again in the next cycle.
//
// With TMR=1 the grant and pending flags are kept in a triplicated, voted
// register (tmr_reg); seu_i injects upsets into its copies.
//
// Interface: ca_req_i/ca_rsp_o (data, priority), cb_req_i/cb_rsp_o
// (instruction fetch), m_req_o/m_rsp_i towards the bus. conflict_o is high in
// a cycle where a data request was granted while a fetch was waiting.
// Timing: zero-cycle pass-through when the bus is free.
module bus_switch
  import ecc_pkg::*;
#(
  parameter bit TMR = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t ca_req_i,
  output bus_rsp_t ca_rsp_o,
  input  bus_req_t cb_req_i,
  output bus_rsp_t cb_rsp_o,
  output bus_req_t m_req_o,
  input  bus_rsp_t m_rsp_i,
  output logic     conflict_o,
  input  logic [2:0] seu_i
);

  typedef enum logic [1:0] {GNT_NONE = 2'd0, GNT_A = 2'd1, GNT_B = 2'd2} gnt_e;

  typedef struct packed {
    gnt_e gnt;
    logic a_pend;
    logic b_pend;
  } sw_state_t;

  sw_state_t cur, nxt;
  logic      a_want, b_want, done, unused_mismatch;
  gnt_e      sel;

  assign a_want = ca_req_i.stb | cur.a_pend;
  assign b_want = cb_req_i.stb | cur.b_pend;
  assign done   = m_rsp_i.ack | m_rsp_i.err;

  always_comb begin
    nxt = cur;
    sel = cur.gnt;
    conflict_o = 1'b0;
    if (cur.gnt == GNT_NONE) begin
      if (a_want)      sel = GNT_A;
      else if (b_want) sel = GNT_B;
      conflict_o = a_want & b_want;
    end
    // a request waits until it is granted; masters issue no new stb while
    // their own request is being served
    nxt.a_pend = a_want & ~(cur.gnt == GNT_NONE && sel == GNT_A);
    nxt.b_pend = b_want & ~(cur.gnt == GNT_NONE && sel == GNT_B);
    nxt.gnt = done ? GNT_NONE : sel;
  end

  always_comb begin
    m_req_o = '0;
    unique case (sel)
      GNT_A:   m_req_o = ca_req_i;
      GNT_B:   m_req_o = cb_req_i;
      default: m_req_o = '0;
    endcase
    m_req_o.stb = (cur.gnt == GNT_NONE) && (sel != GNT_NONE);
  end

  assign ca_rsp_o = (sel == GNT_A) ? m_rsp_i : '0;
  assign cb_rsp_o = (sel == GNT_B) ? m_rsp_i : '0;

  tmr_reg #(.WIDTH($bits(sw_state_t)), .RESET_VAL('0), .TMR(TMR)) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(nxt), .seu_i(seu_i),
    .q(cur), .mismatch(unused_mismatch)
  );

endmodule
