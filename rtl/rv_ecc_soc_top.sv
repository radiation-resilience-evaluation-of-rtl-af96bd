// rv_ecc_soc_top: fabric part of a radiation-hardened RISC-V microcontroller.
//
// The processor runs from flash-based instruction memory, which radiation
// does not upset, and keeps its data in SRAM block RAM, which it does. This
// top holds everything around the CPU core that the hardening touches:
//
//   CPU fetch port --+                         +--> ecc_dmem (0x8000_0000, 16 KB,
//                    +-> bus_switch -> bus_gateway      4 x Hsiao(13,8) lanes)
//   CPU data port ---+   (data first)    |     +--> bus_keeper register
//                                        |     +--> wb_ext_if -> Wishbone ->
//                        bus_keeper <----+          wb2ahbl_bridge -> AHB-Lite
//                        (15-cycle watch)           master port (to the flash
//                                                   instruction memory at 0x6000_0000)
//   CPU register-file port -> ecc_regfile (32 x Hsiao(39,32))
//   ECC error events -> ecc_counters (4 counters)
//
// The CPU core itself (RV32IMC with performance counters) is not part of this
// module: its instruction-fetch and data bus ports and its register-file port
// are ports here, as is the AHB-Lite port that leads to the microcontroller
// subsystem's flash controller. The two AHB response bits are OR-ed into the
// bridge's single error input.
//
// TMR=1 gives the ECC+TMR configuration: every control flip-flop of the bus
// switch, bus keeper, external interface and bridge is triplicated and voted.
// Memories (DMEM and register file) are protected by ECC only. TMR=0 keeps
// ECC only.
//
// Simulation hooks, tied to zero in a real design: dmem_inj_i and rf_inj_i are
// XOR-ed into every encoder output on writes; seu_i[3k+2:3k] inverts copies of
// the TMR state of unit k (0 switch, 1 keeper, 2 external interface, 3 bridge).
//
// Timing: DMEM answers one cycle after a request; an external access takes
// two cycles of Wishbone/AHB handshake plus the slave's wait states; any
// access not answered within 15 cycles ends with a bus error.
module rv_ecc_soc_top
  import ecc_pkg::*;
#(
  parameter bit          TMR       = 1'b1,
  parameter int unsigned DMEM_SZ   = DMEM_SIZE,
  parameter int unsigned NUM_REGS  = 32,
  parameter int unsigned TIMEOUT   = BUS_TIMEOUT,
  parameter int unsigned CNT_WIDTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU bus ports
  input  bus_req_t    cpu_i_req,
  output bus_rsp_t    cpu_i_rsp,
  input  bus_req_t    cpu_d_req,
  output bus_rsp_t    cpu_d_rsp,
  // CPU register-file port
  input  logic                        rf_ren,
  input  logic [$clog2(NUM_REGS)-1:0] rf_rs1_addr,
  input  logic [$clog2(NUM_REGS)-1:0] rf_rs2_addr,
  input  logic                        rf_we,
  input  logic [$clog2(NUM_REGS)-1:0] rf_rd_addr,
  input  logic [31:0]                 rf_rd_data,
  output logic [31:0]                 rf_rs1,
  output logic [31:0]                 rf_rs2,
  output logic [1:0]                  rf_rs1_err,
  output logic [1:0]                  rf_rs2_err,
  // AHB-Lite master port (fabric interface to the flash instruction memory)
  output logic [31:0] haddr,
  output logic        hwrite,
  output logic [1:0]  htrans,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [3:0]  hprot,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic [1:0]  hresp,
  // ECC performance counters
  input  logic                 cnt_clr,
  output logic [CNT_WIDTH-1:0] dmem_single_cnt,
  output logic [CNT_WIDTH-1:0] dmem_double_cnt,
  output logic [CNT_WIDTH-1:0] rf_single_cnt,
  output logic [CNT_WIDTH-1:0] rf_double_cnt,
  // status
  output logic        bus_fault,
  output logic        bus_timeout,
  output logic        bus_conflict,
  // simulation fault-injection hooks
  input  logic [12:0] dmem_inj_i,
  input  logic [38:0] rf_inj_i,
  input  logic [11:0] seu_i
);

  bus_req_t m_req;
  bus_rsp_t m_rsp, dev_rsp, dmem_rsp, bk_rsp, ext_rsp;
  logic     dmem_sel, bk_sel, ext_sel;
  logic     dmem_single, dmem_double, rf_single, rf_double;

  logic        wb_cyc, wb_stb, wb_we, wb_ack, wb_err;
  logic [31:0] wb_adr, wb_dat_w, wb_dat_r;
  logic [3:0]  wb_sel;

  bus_switch #(.TMR(TMR)) u_switch (
    .clk(clk), .rst_n(rst_n),
    .ca_req_i(cpu_d_req), .ca_rsp_o(cpu_d_rsp),
    .cb_req_i(cpu_i_req), .cb_rsp_o(cpu_i_rsp),
    .m_req_o(m_req), .m_rsp_i(m_rsp),
    .conflict_o(bus_conflict), .seu_i(seu_i[2:0])
  );

  bus_gateway #(.DMEM_BASE_A(DMEM_BASE), .DMEM_SZ(DMEM_SZ)) u_gateway (
    .req_i(m_req),
    .dmem_sel_o(dmem_sel), .bk_sel_o(bk_sel), .ext_sel_o(ext_sel),
    .dmem_rsp_i(dmem_rsp), .bk_rsp_i(bk_rsp), .ext_rsp_i(ext_rsp),
    .dev_rsp_o(dev_rsp), .rsp_o(m_rsp)
  );

  bus_keeper #(.TIMEOUT(TIMEOUT), .TMR(TMR)) u_keeper (
    .clk(clk), .rst_n(rst_n),
    .req_i(m_req), .dev_rsp_i(dev_rsp), .sel_i(bk_sel),
    .rsp_o(bk_rsp), .timeout_o(bus_timeout), .fault_o(bus_fault),
    .seu_i(seu_i[5:3])
  );

  ecc_dmem #(.SIZE(DMEM_SZ)) u_dmem (
    .clk(clk), .rst_n(rst_n), .sel_i(dmem_sel), .req_i(m_req), .rsp_o(dmem_rsp),
    .inj_i(dmem_inj_i), .single_o(dmem_single), .double_o(dmem_double)
  );

  wb_ext_if #(.TMR(TMR)) u_ext (
    .clk(clk), .rst_n(rst_n), .sel_i(ext_sel), .req_i(m_req), .rsp_o(ext_rsp),
    .abort_i(bus_timeout),
    .wb_cyc_o(wb_cyc), .wb_stb_o(wb_stb), .wb_we_o(wb_we), .wb_adr_o(wb_adr),
    .wb_dat_o(wb_dat_w), .wb_sel_o(wb_sel), .wb_dat_i(wb_dat_r),
    .wb_ack_i(wb_ack), .wb_err_i(wb_err), .seu_i(seu_i[8:6])
  );

  wb2ahbl_bridge #(.TMR(TMR)) u_bridge (
    .hclk(clk), .hresetn(rst_n),
    .cyc_i(wb_cyc), .stb_i(wb_stb), .we_i(wb_we), .addr_i(wb_adr),
    .data_i(wb_dat_w), .sel_i(wb_sel), .data_o(wb_dat_r), .ack_o(wb_ack), .err_o(wb_err),
    .haddr(haddr), .hwrite(hwrite), .htrans(htrans), .hsize(hsize),
    .hburst(hburst), .hprot(hprot), .hwdata(hwdata), .hrdata(hrdata),
    .hready(hready), .hresp(|hresp), .seu_i(seu_i[11:9])
  );

  ecc_regfile #(.NUM_REGS(NUM_REGS)) u_regfile (
    .clk(clk), .ren(rf_ren), .rs1_addr(rf_rs1_addr), .rs2_addr(rf_rs2_addr),
    .rd_we(rf_we), .rd_addr(rf_rd_addr), .rd_data(rf_rd_data), .inj_i(rf_inj_i),
    .rs1_o(rf_rs1), .rs2_o(rf_rs2), .rs1_err(rf_rs1_err), .rs2_err(rf_rs2_err),
    .single_o(rf_single), .double_o(rf_double)
  );

  ecc_counters #(.WIDTH(CNT_WIDTH)) u_counters (
    .clk(clk), .rst_n(rst_n), .clr_i(cnt_clr),
    .dmem_single_i(dmem_single), .dmem_double_i(dmem_double),
    .rf_single_i(rf_single), .rf_double_i(rf_double),
    .dmem_single_cnt(dmem_single_cnt), .dmem_double_cnt(dmem_double_cnt),
    .rf_single_cnt(rf_single_cnt), .rf_double_cnt(rf_double_cnt)
  );

endmodule
