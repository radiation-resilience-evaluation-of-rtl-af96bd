// ecc_counters: hardware performance counters for ECC events.
//
// Four free-running event counters give software a view of what the ECC
// logic did: corrected single errors and detected double errors, separately
// for the data memory and for the register file. Each counter adds one in
// every cycle where its event input is high and wraps at 2**WIDTH. clr_i
// clears all four (for instance when a new benchmark run starts).
//
// Interface: clk, rst_n (asynchronous, active low), clr_i, four event inputs,
// four WIDTH-bit count outputs. Timing: a count is visible one cycle after
// its event.
module ecc_counters #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_i,
  input  logic             dmem_single_i,
  input  logic             dmem_double_i,
  input  logic             rf_single_i,
  input  logic             rf_double_i,
  output logic [WIDTH-1:0] dmem_single_cnt,
  output logic [WIDTH-1:0] dmem_double_cnt,
  output logic [WIDTH-1:0] rf_single_cnt,
  output logic [WIDTH-1:0] rf_double_cnt
);

  logic [3:0]       ev;
  logic [WIDTH-1:0] cnt [4];

  assign ev = {rf_double_i, rf_single_i, dmem_double_i, dmem_single_i};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        if (clr_i)      cnt[i] <= '0;
        else if (ev[i]) cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

  assign dmem_single_cnt = cnt[0];
  assign dmem_double_cnt = cnt[1];
  assign rf_single_cnt   = cnt[2];
  assign rf_double_cnt   = cnt[3];

endmodule
