// tmr_reg: register protected by flip-flop level triple modular redundancy.
//
// With TMR=1 the register is held in three copies that all load the same next
// value d (or RESET_VAL on reset); q is the bitwise majority of the copies, so
// an upset in one copy never reaches q and is overwritten on the next load.
// With TMR=0 only one copy is built (the unprotected configuration).
// Loading happens every cycle where en is high, like an enabled flip-flop.
//
// seu_i[2:0] is a simulation hook for fault injection: a high bit inverts
// every bit of that copy's stored value on the next clock edge instead of
// loading it. Tie it to zero in a real design. mismatch is high while the
// copies disagree.
//
// Interface: clk, rst_n (asynchronous, active low), en, d, q, seu_i, mismatch.
// Timing: one clock from d to q, like a plain register.
module tmr_reg #(
  parameter int unsigned      WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0,
  parameter bit               TMR       = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  input  logic [2:0]       seu_i,
  output logic [WIDTH-1:0] q,
  output logic             mismatch
);

  localparam int unsigned COPIES = TMR ? 3 : 1;

  logic [WIDTH-1:0] r [COPIES];

  for (genvar i = 0; i < COPIES; i++) begin : g_copy
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        r[i] <= RESET_VAL;
      else if (seu_i[i]) r[i] <= ~r[i];
      else if (en)       r[i] <= d;
    end
  end

  if (TMR) begin : g_vote
    tmr_voter #(.WIDTH(WIDTH)) u_voter (
      .a(r[0]), .b(r[1]), .c(r[2]), .y(q), .mismatch(mismatch)
    );
  end else begin : g_single
    assign q        = r[0];
    assign mismatch = 1'b0;
  end

endmodule
