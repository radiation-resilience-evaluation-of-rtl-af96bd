// hsiao_enc_13_8: Hsiao (13,8) SEC-DED encoder.
//
// Purely combinational. The codeword starts as the 8 data bits placed in the
// low bits; each of the 5 check bits (positions 8..12) is then the XOR of the
// codeword bits selected by one row mask of the parity-check matrix (the
// check-bit positions themselves are still zero at that point). This is the
// mask-and-reduce structure the design uses for both of its codes; the
// matrix itself is defined in ecc_pkg.
//
// Interface: enc_in[8-1:0] data, enc_out[13-1:0] = {check bits, data}.
// Timing: no clock, one level of XOR trees.
module hsiao_enc_13_8
  import ecc_pkg::*;
(
  input  logic [8-1:0] enc_in,
  output logic [13-1:0] enc_out
);

  always_comb begin
    enc_out = 13'(enc_in);
    for (int k = 0; k < 5; k++) begin
      enc_out[8 + k] = ^(enc_out & H13_MASK[k]);
    end
  end

endmodule
