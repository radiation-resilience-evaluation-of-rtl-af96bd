// ecc_dmem: data memory with per-byte Hsiao (13,8) SEC-DED protection.
//
// RISC-V stores bytes, half-words and words. Protecting a whole 32-bit word
// would need a read-modify-write for every partial store, so each byte lane is
// protected on its own: the memory is four banks (one per byte lane) of
// SIZE/4 entries, and every entry is a 13-bit codeword (8 data + 5 check
// bits). Each lane has its own encoder on the write side and its own decoder
// on the read side, so a byte store touches only its bank and needs no read.
//
// Reads return the corrected word. single_o pulses with the read response
// when at least one lane had a corrected single-bit error, double_o when at
// least one lane had an uncorrectable double-bit error (its data bits are
// then returned as stored). Errors are not written back here: a scrubbing
// load/store pair in software repairs a word. Double errors do not raise a bus
// fault; they are only counted.
//
// inj_i is a fault-injection hook: it is XOR-ed into the output of every
// lane's encoder on writes (all-zero in normal use). The banks start at
// all-zero codewords (0 encodes to 0), as a block-RAM initial value.
//
// Interface: processor-internal bus slave (ecc_pkg::bus_req_t/bus_rsp_t),
// selected by sel_i; addr bits [log2(SIZE)-1:2] pick the word.
// Timing: every access is answered with ack exactly one cycle after its stb.
module ecc_dmem
  import ecc_pkg::*;
#(
  parameter int unsigned SIZE = DMEM_SIZE   // bytes
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sel_i,
  input  bus_req_t req_i,
  output bus_rsp_t rsp_o,
  input  logic [12:0] inj_i,
  output logic     single_o,
  output logic     double_o
);

  localparam int unsigned WORDS = SIZE / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [AW-1:0] widx;
  logic          acc, rd_q, ack_q;
  logic [3:0]    lane_single, lane_double;
  logic [31:0]   rdata;

  assign widx = req_i.addr[AW+1:2];
  assign acc  = sel_i & req_i.stb;

  for (genvar l = 0; l < 4; l++) begin : g_lane
    logic [12:0] mem [WORDS];
    logic [12:0] wr_cw, rd_cw;
    logic [4:0]  syn;
    logic [1:0]  err;

    initial begin
      for (int i = 0; i < WORDS; i++) mem[i] = '0;
    end

    hsiao_enc_13_8 u_enc (.enc_in(req_i.data[8*l +: 8]), .enc_out(wr_cw));

    always_ff @(posedge clk) begin
      if (acc && req_i.rw && req_i.ben[l]) mem[widx] <= wr_cw ^ inj_i;
      if (acc && !req_i.rw) rd_cw <= mem[widx];
    end

    hsiao_dec_13_8 u_dec (
      .dec_in(rd_cw), .dec_out(rdata[8*l +: 8]), .dec_syndrome_out(syn), .dec_errorout(err)
    );

    assign lane_single[l] = err[0];
    assign lane_double[l] = err[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q <= 1'b0;
      rd_q  <= 1'b0;
    end else begin
      ack_q <= acc;
      rd_q  <= acc & ~req_i.rw;
    end
  end

  assign rsp_o.ack  = ack_q;
  assign rsp_o.err  = 1'b0;
  assign rsp_o.data = rd_q ? rdata : '0;
  assign single_o   = rd_q & (|lane_single);
  assign double_o   = rd_q & (|lane_double);

endmodule
