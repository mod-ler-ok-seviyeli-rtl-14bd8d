// sm_on: source of the "submodule inserted" switch pattern.
//
// An inserted half-bridge submodule has S1 on and S2 off, so its output is the
// capacitor voltage. This register holds both switches off while reset is
// asserted (asynchronous, active high) and drives S1 = 1, S2 = 0 from the first
// clock edge after reset is released. The arm gate modules hand this pattern
// to every submodule they insert, so all gates stay open during reset.
// Follows the description's SM ON module.
module sm_on
  import nlm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output gate_pair_t pattern
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) pattern <= GATE_IDLE;
    else     pattern <= GATE_ON;
  end

endmodule
