// wb2ahbl_bridge: Wishbone (classic, single transfers) slave to AHB-Lite master.
//
// The CPU's external Wishbone port reaches the microcontroller subsystem's
// non-volatile instruction memory through an AHB-Lite fabric interface. The
// two buses are close enough that most signals map straight across
// (we_i->HWRITE, data_i->HWDATA, HRDATA->data_o, HRESP->err_o). The rest:
//
//  * One flip-flop, stb_dl, holds the strobe of the previous cycle. A new
//    transfer is a rising strobe (stb & ~stb_dl). HTRANS is NONSEQ in that
//    cycle if HREADY is high, IDLE otherwise: bursts, BUSY and SEQ are never
//    used, HBURST is 000 (single) and HPROT 0000.
//  * ack_o = HREADY & stb & stb_dl: the AHB data phase (the cycle after the
//    address phase at the earliest) completes when the slave drives HREADY.
//  * HSIZE comes from the byte selects: 1111 -> word (010), 0011/1100 ->
//    half-word (001), a single lane -> byte (000); any other pattern is sent
//    as a word.
//  * HADDR is aligned to the transfer size: the two low address bits are
//    cleared for a word, bit 0 for a half-word, and a byte address passes
//    unchanged.
//
// A Wishbone master must drop stb for at least one cycle between two
// transfers, since a held strobe is not a new transfer. stb is taken as
// stb_i & cyc_i. With TMR=1 the stb_dl flip-flop is triplicated and voted
// (tmr_reg); seu_i is that register's fault-injection hook (tie to 0).
//
// Timing: address phase in the first strobe cycle, data phase from the next
// cycle on; ack_o in the cycle HREADY returns high, i.e. two cycles for a
// zero-wait-state slave.
module wb2ahbl_bridge
  import ecc_pkg::*;
#(
  parameter bit TMR = 1'b1
) (
  input  logic        hclk,
  input  logic        hresetn,
  // Wishbone slave side
  input  logic        cyc_i,
  input  logic        stb_i,
  input  logic        we_i,
  input  logic [31:0] addr_i,
  input  logic [31:0] data_i,
  input  logic [3:0]  sel_i,
  output logic [31:0] data_o,
  output logic        ack_o,
  output logic        err_o,
  // AHB-Lite master side
  output logic [31:0] haddr,
  output logic        hwrite,
  output logic [1:0]  htrans,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [3:0]  hprot,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic        hresp,
  // fault injection hook for the stb_dl register copies
  input  logic [2:0]  seu_i
);

  logic stb, stb_dl, unused_mismatch;

  assign stb = stb_i & cyc_i;

  tmr_reg #(.WIDTH(1), .RESET_VAL(1'b0), .TMR(TMR)) u_stb_dl (
    .clk(hclk), .rst_n(hresetn), .en(1'b1), .d(stb), .seu_i(seu_i),
    .q(stb_dl), .mismatch(unused_mismatch)
  );

  always_comb begin
    unique case (sel_i)
      4'b1111:                             hsize = HSIZE_WORD;
      4'b0011, 4'b1100:                    hsize = HSIZE_HALF;
      4'b0001, 4'b0010, 4'b0100, 4'b1000:  hsize = HSIZE_BYTE;
      default:                             hsize = HSIZE_WORD;
    endcase
  end

  always_comb begin
    unique case (hsize)
      HSIZE_WORD: haddr = {addr_i[31:2], 2'b00};
      HSIZE_HALF: haddr = {addr_i[31:1], 1'b0};
      default:    haddr = addr_i;
    endcase
  end

  assign htrans = (hready && stb && !stb_dl) ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign ack_o  = hready & stb & stb_dl;
  assign err_o  = hresp;
  assign hwrite = we_i;
  assign hwdata = data_i;
  assign data_o = hrdata;
  assign hburst = 3'b000;
  assign hprot  = 4'b0000;

endmodule
