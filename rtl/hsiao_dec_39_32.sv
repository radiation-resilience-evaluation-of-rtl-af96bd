// hsiao_dec_39_32: Hsiao (39,32) SEC-DED decoder.
//
// Purely combinational. The 7-bit syndrome is the XOR of the received bits
// selected by each row mask of the parity-check matrix (ecc_pkg). A data bit is
// flipped when the syndrome equals that bit's column, which corrects any single
// error in the data. Because every column has odd weight, a single error gives
// an odd-weight syndrome and a double error a non-zero even-weight one:
//   dec_errorout[0] = single error (XOR of the syndrome bits), corrected
//   dec_errorout[1] = double error (syndrome non-zero but even), not corrected;
//                     dec_out then carries the received data bits unchanged.
// An error in a check bit is reported as single and needs no data correction.
//
// Interface: dec_in[39-1:0] codeword, dec_out[32-1:0] data,
// dec_syndrome_out[7-1:0], dec_errorout[1:0]. Timing: no clock.
module hsiao_dec_39_32
  import ecc_pkg::*;
(
  input  logic [39-1:0] dec_in,
  output logic [32-1:0] dec_out,
  output logic [7-1:0] dec_syndrome_out,
  output logic [1:0]      dec_errorout
);

  logic [7-1:0] syn;
  logic         single_error;

  always_comb begin
    for (int k = 0; k < 7; k++) begin
      syn[k] = ^(dec_in & H39_MASK[k]);
    end
  end

  // Column of data bit j, read out of the row masks.
  always_comb begin
    for (int j = 0; j < 32; j++) begin
      logic [7-1:0] col;
      for (int k = 0; k < 7; k++) col[k] = H39_MASK[k][j];
      dec_out[j] = dec_in[j] ^ (syn == col);
    end
  end

  assign single_error     = ^syn;
  assign dec_syndrome_out = syn;
  assign dec_errorout     = {~single_error & (|syn), single_error};

endmodule
