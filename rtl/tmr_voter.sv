// tmr_voter: bitwise 2-out-of-3 majority voter.
//
// Each output bit is 1 when at least two of the three input copies are 1
// (000->0, 001->0, 011->1, 111->1 and permutations), so a single upset copy is
// out-voted. In the flip-flop level TMR of this design there is one such voter
// per triplicated flip-flop, as a synthesis tool's TMR option builds it in one
// small LUT. 'mismatch' flags any disagreement between the copies; it is this
// design's own addition for observing masked upsets.
//
// Interface: a, b, c [WIDTH-1:0] in, y [WIDTH-1:0] voted, mismatch.
// Timing: combinational.
module tmr_voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y,
  output logic             mismatch
);

  assign y        = (a & b) | (a & c) | (b & c);
  assign mismatch = |((a ^ b) | (a ^ c));

endmodule
