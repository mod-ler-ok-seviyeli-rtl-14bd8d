// sm_off: source of the "submodule bypassed" switch pattern.
//
// A bypassed half-bridge submodule has S1 off and S2 on, so its output is
// zero. This register holds both switches off while reset is asserted
// (asynchronous, active high) and drives S1 = 0, S2 = 1 from the first clock
// edge after reset is released. The arm gate modules hand this pattern to every
// submodule they bypass. Follows the description's SM OFF module.
module sm_off
  import nlm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output gate_pair_t pattern
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) pattern <= GATE_IDLE;
    else     pattern <= GATE_OFF;
  end

endmodule
