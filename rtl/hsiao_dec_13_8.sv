// hsiao_dec_13_8: Hsiao (13,8) SEC-DED decoder.
//
// Purely combinational. The 5-bit syndrome is the XOR of the received bits
// selected by each row mask of the parity-check matrix (ecc_pkg). A data bit is
// flipped when the syndrome equals that bit's column, which corrects any single
// error in the data. Because every column has odd weight, a single error gives
// an odd-weight syndrome and a double error a non-zero even-weight one:
//   dec_errorout[0] = single error (XOR of the syndrome bits), corrected
//   dec_errorout[1] = double error (syndrome non-zero but even), not corrected;
//                     dec_out then carries the received data bits unchanged.
// An error in a check bit is reported as single and needs no data correction.
//
// Interface: dec_in[13-1:0] codeword, dec_out[8-1:0] data,
// dec_syndrome_out[5-1:0], dec_errorout[1:0]. Timing: no clock.
module hsiao_dec_13_8
  import ecc_pkg::*;
(
  input  logic [13-1:0] dec_in,
  output logic [8-1:0] dec_out,
  output logic [5-1:0] dec_syndrome_out,
  output logic [1:0]      dec_errorout
);

  logic [5-1:0] syn;
  logic         single_error;

  always_comb begin
    for (int k = 0; k < 5; k++) begin
      syn[k] = ^(dec_in & H13_MASK[k]);
    end
  end

  // Column of data bit j, read out of the row masks.
  always_comb begin
    for (int j = 0; j < 8; j++) begin
      logic [5-1:0] col;
      for (int k = 0; k < 5; k++) col[k] = H13_MASK[k][j];
      dec_out[j] = dec_in[j] ^ (syn == col);
    end
  end

  assign single_error     = ^syn;
  assign dec_syndrome_out = syn;
  assign dec_errorout     = {~single_error & (|syn), single_error};

endmodule
