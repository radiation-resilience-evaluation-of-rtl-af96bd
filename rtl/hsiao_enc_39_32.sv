// hsiao_enc_39_32: Hsiao (39,32) SEC-DED encoder.
//
// Purely combinational. The codeword starts as the 32 data bits placed in the
// low bits; each of the 7 check bits (positions 32..38) is then the XOR of the
// codeword bits selected by one row mask of the parity-check matrix (the
// check-bit positions themselves are still zero at that point). This is the
// mask-and-reduce structure the design uses for both of its codes; the
// matrix itself is defined in ecc_pkg.
//
// Interface: enc_in[32-1:0] data, enc_out[39-1:0] = {check bits, data}.
// Timing: no clock, one level of XOR trees.
module hsiao_enc_39_32
  import ecc_pkg::*;
(
  input  logic [32-1:0] enc_in,
  output logic [39-1:0] enc_out
);

  always_comb begin
    enc_out = 39'(enc_in);
    for (int k = 0; k < 7; k++) begin
      enc_out[32 + k] = ^(enc_out & H39_MASK[k]);
    end
  end

endmodule
