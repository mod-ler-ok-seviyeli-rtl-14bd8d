// arm_gate: gate commands for the submodules of one converter arm.
//
// The same module serves the upper arm (fed with n_upper) and the lower arm
// (fed with N_SM - n_upper). On each level_valid strobe it latches the number
// of submodules to insert, n_active; submodules 0 .. n_active-1 then receive
// the SM ON pattern (S1=1, S2=0) and the others the SM OFF pattern (S1=0,
// S2=1), both taken from the sm_on / sm_off modules. The arm voltage is thus
// n_active capacitor voltages.
//
// Which submodules are inserted for a given count is fixed (lowest index
// first): the capacitors are held at their voltage by external supplies, so no
// voltage sorting is done. That order, and the reset level RESET_LEVEL
// (N_SM/2, which keeps the sum of inserted submodules of both arms at N_SM), are
// this design's choices; the count-to-pattern function follows the description.
//
// Timing: gates follows n_active in the cycle after level_valid; it is
// combinational in the patterns. Reset is asynchronous, active high.
module arm_gate
  import nlm_pkg::*;
#(
  parameter int unsigned RESET_LEVEL = N_SM / 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       level_valid,
  input  level_t     n_active,
  input  gate_pair_t on_pattern,
  input  gate_pair_t off_pattern,
  output gate_pair_t gates [N_SM]
);

  level_t n_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)              n_q <= LEVEL_W'(RESET_LEVEL);
    else if (level_valid) n_q <= n_active;
  end

  always_comb begin
    for (int i = 0; i < int'(N_SM); i++) begin
      gates[i] = (i < int'(n_q)) ? on_pattern : off_pattern;
    end
  end

endmodule
