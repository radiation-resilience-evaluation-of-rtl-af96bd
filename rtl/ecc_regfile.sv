// ecc_regfile: RISC-V integer register file protected by Hsiao (39,32) SEC-DED.
//
// Each of the NUM_REGS registers is stored as a 39-bit codeword (32 data bits
// and 7 check bits) in a memory with one write and two read ports, which maps
// onto block RAM. A single encoder sits on the write port and one decoder on
// each read port (rs1, rs2). Both read ports read their register every cycle;
// a single-bit error is corrected on the way out and a double-bit error is
// detected. The stored copy is not repaired (there is no register-file
// scrubbing); the next write of that register overwrites it.
//
// Register x0 is never written and always reads as zero. The array starts at
// all-zero codewords (the encoding of 0 is 0), as a block-RAM initial value.
//
// Error events (single_o, double_o) are counted only in cycles where ren was
// high on the previous edge, i.e. when the CPU uses the read operands; they
// are the OR over both ports. inj_i is a fault-injection hook: it is XOR-ed
// into the encoder output on every write (all-zero in normal use).
//
// Timing: synchronous write; synchronous read, data and flags valid in the
// cycle after the address is presented (like the CPU's block-RAM register
// file). Writing and reading the same register in one cycle returns the old
// value.
module ecc_regfile #(
  parameter int unsigned NUM_REGS = 32
) (
  input  logic                        clk,
  input  logic                        ren,
  input  logic [$clog2(NUM_REGS)-1:0] rs1_addr,
  input  logic [$clog2(NUM_REGS)-1:0] rs2_addr,
  input  logic                        rd_we,
  input  logic [$clog2(NUM_REGS)-1:0] rd_addr,
  input  logic [31:0]                 rd_data,
  input  logic [38:0]                 inj_i,
  output logic [31:0]                 rs1_o,
  output logic [31:0]                 rs2_o,
  output logic [1:0]                  rs1_err,
  output logic [1:0]                  rs2_err,
  output logic                        single_o,
  output logic                        double_o
);


  logic [38:0] mem [NUM_REGS];
  logic [38:0] wr_cw, rd1_cw, rd2_cw;
  logic        rs1_zero, rs2_zero, ren_q;
  logic [31:0] dec1, dec2;
  logic [1:0]  err1, err2;
  logic [6:0]  syn1, syn2;

  initial begin
    for (int i = 0; i < NUM_REGS; i++) mem[i] = '0;
  end

  hsiao_enc_39_32 u_enc (.enc_in(rd_data), .enc_out(wr_cw));

  always_ff @(posedge clk) begin
    if (rd_we && rd_addr != '0) mem[rd_addr] <= wr_cw ^ inj_i;
    rd1_cw   <= mem[rs1_addr];
    rd2_cw   <= mem[rs2_addr];
    rs1_zero <= (rs1_addr == '0);
    rs2_zero <= (rs2_addr == '0);
    ren_q    <= ren;
  end

  hsiao_dec_39_32 u_dec1 (.dec_in(rd1_cw), .dec_out(dec1), .dec_syndrome_out(syn1), .dec_errorout(err1));
  hsiao_dec_39_32 u_dec2 (.dec_in(rd2_cw), .dec_out(dec2), .dec_syndrome_out(syn2), .dec_errorout(err2));

  assign rs1_o    = rs1_zero ? '0 : dec1;
  assign rs2_o    = rs2_zero ? '0 : dec2;
  assign rs1_err  = rs1_zero ? '0 : err1;
  assign rs2_err  = rs2_zero ? '0 : err2;
  assign single_o = ren_q & (rs1_err[0] | rs2_err[0]);
  assign double_o = ren_q & (rs1_err[1] | rs2_err[1]);

endmodule
