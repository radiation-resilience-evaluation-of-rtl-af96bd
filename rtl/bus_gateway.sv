// bus_gateway: address decoder of the processor-internal bus.
//
// One request bus fans out to the devices; the decoder raises exactly one
// select per request from its address:
//   DMEM_BASE .. DMEM_BASE+DMEM_SZ-1   data memory (dmem_sel_o)
//   BUSKEEPER_ADDR (one word)          bus keeper control register (bk_sel_o)
//   anything else                      external Wishbone interface (ext_sel_o),
//                                      which reaches the instruction memory
// Selects are decoded from the held address, so they stay valid for the whole
// transfer. Device responses are all-zero when idle and are OR-ed into one
// response for the CPU (rsp_o); dev_rsp_o is the same OR without the bus
// keeper, which the keeper watches.
//
// Timing: combinational.
module bus_gateway
  import ecc_pkg::*;
#(
  parameter logic [31:0] DMEM_BASE_A = DMEM_BASE,
  parameter int unsigned DMEM_SZ     = DMEM_SIZE
) (
  input  bus_req_t req_i,
  output logic     dmem_sel_o,
  output logic     bk_sel_o,
  output logic     ext_sel_o,
  input  bus_rsp_t dmem_rsp_i,
  input  bus_rsp_t bk_rsp_i,
  input  bus_rsp_t ext_rsp_i,
  output bus_rsp_t dev_rsp_o,
  output bus_rsp_t rsp_o
);

  logic [31:0] offs;

  assign offs       = req_i.addr - DMEM_BASE_A;
  assign dmem_sel_o = (offs < DMEM_SZ);
  assign bk_sel_o   = ~dmem_sel_o & (req_i.addr[31:2] == BUSKEEPER_ADDR[31:2]);
  assign ext_sel_o  = ~dmem_sel_o & ~bk_sel_o;

  assign dev_rsp_o  = dmem_rsp_i | ext_rsp_i;
  assign rsp_o      = dmem_rsp_i | ext_rsp_i | bk_rsp_i;

endmodule
