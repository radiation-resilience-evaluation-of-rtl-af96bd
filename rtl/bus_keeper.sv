// bus_keeper: watchdog of the processor-internal bus.
//
// Every transfer must end with an ack or an err. The keeper watches each
// request (stb) on the bus and the OR of all device responses. If the
// addressed device does not answer within TIMEOUT cycles, the keeper itself
// answers with err, which the CPU turns into an instruction, load or store
// access fault, and raises timeout_o so that the external interface can drop
// its pending transfer. A device err passes to the CPU on its own; the keeper
// only records it.
//
// Control register (at BUSKEEPER_ADDR, sel_i): bit 31 is the fault flag, set
// by any bus fault; bit 0 is the fault type, 0 for a device error and 1 for a
// timeout. Any read or write of the register returns its value (reads) and
// clears the flag. The register is answered by the keeper itself one cycle
// after the request and is not watched.
//
// Timing: with stb in cycle t, a device answer in cycles t+1 .. t+TIMEOUT is
// accepted; otherwise the keeper's err (and timeout_o) comes in cycle
// t+TIMEOUT. With TMR=1 all keeper state is kept in a triplicated, voted
// register (tmr_reg).
module bus_keeper
  import ecc_pkg::*;
#(
  parameter int unsigned TIMEOUT = BUS_TIMEOUT,
  parameter bit          TMR     = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req_i,
  input  bus_rsp_t dev_rsp_i,
  input  logic     sel_i,
  output bus_rsp_t rsp_o,
  output logic     timeout_o,
  output logic     fault_o,
  input  logic [2:0] seu_i
);

  localparam int unsigned CW = $clog2(TIMEOUT + 1);

  typedef struct packed {
    logic          pending;
    logic [CW-1:0] cnt;
    logic          flag;
    logic          ftype;
    logic          reg_ack;
    logic          reg_rd;
  } bk_state_t;

  bk_state_t cur, nxt;
  logic      tmo, dev_done, unused_mismatch;

  assign dev_done = dev_rsp_i.ack | dev_rsp_i.err;
  assign tmo      = cur.pending & ~dev_done & (cur.cnt == CW'(TIMEOUT - 1));

  always_comb begin
    nxt         = cur;
    nxt.reg_ack = 1'b0;
    nxt.reg_rd  = 1'b0;
    if (cur.pending) begin
      if (dev_done || tmo) nxt.pending = 1'b0;
      else                 nxt.cnt     = cur.cnt + 1'b1;
      if (dev_rsp_i.err) begin
        nxt.flag  = 1'b1;
        nxt.ftype = 1'b0;
      end else if (tmo) begin
        nxt.flag  = 1'b1;
        nxt.ftype = 1'b1;
      end
    end
    if (cur.reg_ack) nxt.flag = 1'b0;   // read or write clears the flag
    if (req_i.stb) begin
      if (sel_i) begin
        nxt.reg_ack = 1'b1;
        nxt.reg_rd  = ~req_i.rw;
      end else begin
        nxt.pending = 1'b1;
        nxt.cnt     = '0;
      end
    end
  end

  tmr_reg #(.WIDTH($bits(bk_state_t)), .RESET_VAL('0), .TMR(TMR)) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(nxt), .seu_i(seu_i),
    .q(cur), .mismatch(unused_mismatch)
  );

  assign timeout_o  = tmo;
  assign fault_o    = cur.flag;
  assign rsp_o.err  = tmo;
  assign rsp_o.ack  = cur.reg_ack;
  assign rsp_o.data = cur.reg_rd ? {cur.flag, 30'b0, cur.ftype} : '0;

endmodule
