// wb_ext_if: external bus interface, processor-internal bus to Wishbone master.
//
// Every request that no processor-internal device claims leaves the SoC
// through this unit as a Wishbone classic single read or write. On the
// request's stb the address, write data, byte selects and direction are
// captured and cyc/stb are raised in the next cycle; they stay high, with the
// captured values stable, until the slave answers with ack or err. That
// answer is passed straight back as the internal bus response (read data
// with ack, a bus fault with err) and cyc/stb drop in the next cycle, so
// there is always at least one idle cycle between two Wishbone transfers.
// abort_i (the bus keeper's timeout) also ends a pending transfer, without a
// response from this unit.
//
// With TMR=1 all state (busy flag and captured request, 70 bits) is kept in
// a triplicated, voted register (tmr_reg), as the flip-flop level TMR
// configuration does for every CPU-side flip-flop; seu_i injects upsets.
//
// Timing: Wishbone strobe one cycle after the internal stb; response in the
// cycle wb_ack_i/wb_err_i is seen.
module wb_ext_if
  import ecc_pkg::*;
#(
  parameter bit TMR = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel_i,
  input  bus_req_t    req_i,
  output bus_rsp_t    rsp_o,
  input  logic        abort_i,
  output logic        wb_cyc_o,
  output logic        wb_stb_o,
  output logic        wb_we_o,
  output logic [31:0] wb_adr_o,
  output logic [31:0] wb_dat_o,
  output logic [3:0]  wb_sel_o,
  input  logic [31:0] wb_dat_i,
  input  logic        wb_ack_i,
  input  logic        wb_err_i,
  input  logic [2:0]  seu_i
);

  typedef struct packed {
    logic        busy;
    logic        we;
    logic [3:0]  sel;
    logic [31:0] adr;
    logic [31:0] dat;
  } wb_state_t;

  wb_state_t cur, nxt;
  logic      unused_mismatch;

  always_comb begin
    nxt = cur;
    if (!cur.busy) begin
      if (sel_i && req_i.stb) begin
        nxt.busy = 1'b1;
        nxt.we   = req_i.rw;
        nxt.sel  = req_i.ben;
        nxt.adr  = req_i.addr;
        nxt.dat  = req_i.data;
      end
    end else if (wb_ack_i || wb_err_i || abort_i) begin
      nxt.busy = 1'b0;
    end
  end

  tmr_reg #(.WIDTH($bits(wb_state_t)), .RESET_VAL('0), .TMR(TMR)) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(nxt), .seu_i(seu_i),
    .q(cur), .mismatch(unused_mismatch)
  );

  assign wb_cyc_o   = cur.busy;
  assign wb_stb_o   = cur.busy;
  assign wb_we_o    = cur.we;
  assign wb_sel_o   = cur.sel;
  assign wb_adr_o   = cur.adr;
  assign wb_dat_o   = cur.dat;

  assign rsp_o.ack  = cur.busy & wb_ack_i;
  assign rsp_o.err  = cur.busy & wb_err_i;
  assign rsp_o.data = (cur.busy & wb_ack_i & ~cur.we) ? wb_dat_i : '0;

endmodule
