// dead_time: dead-time generator for the two switches of one half-bridge
// submodule.
//
// The commands cmd.s1 / cmd.s2 are complementary. A switch is turned off in the
// cycle after its command falls, but turned on only after both switches have
// been off for DEAD_CYCLES master cycles; a command of both switches on, or of
// both off, keeps both off. So S1 and S2 are never on together and every change
// over leaves a gap of exactly DEAD_CYCLES cycles (20 cycles = 200 ns at
// 100 MHz, the description's dead time for the MOSFETs).
//
// Timing: a falling command shows at gate one cycle later; a rising one
// DEAD_CYCLES cycles after the other switch fell (DEAD_CYCLES cycles after
// reset release for the first turn-on). Reset (asynchronous, active high)
// opens both switches.
//
// The turn-on-delay structure is this design's choice; the description gives
// only the purpose of the block and its 200 ns.
module dead_time
  import nlm_pkg::*;
#(
  parameter int unsigned DEAD_CYCLES = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  gate_pair_t cmd,
  output gate_pair_t gate
);

  if (DEAD_CYCLES < 1) begin : g_bad_dead
    $error("DEAD_CYCLES must be at least 1");
  end

  localparam int unsigned CNT_W = $clog2(DEAD_CYCLES + 1);

  logic [CNT_W-1:0] idle_cnt;   // cycles both switches have been off
  logic             both_off;
  logic             ready;

  assign both_off = ~gate.s1 & ~gate.s2;
  assign ready    = both_off && (int'(idle_cnt) >= int'(DEAD_CYCLES) - 1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      gate     <= GATE_IDLE;
      idle_cnt <= '0;
    end else begin
      gate.s1 <= (gate.s1 & cmd.s1) | (ready & cmd.s1 & ~cmd.s2);
      gate.s2 <= (gate.s2 & cmd.s2) | (ready & cmd.s2 & ~cmd.s1);
      if (!both_off)                            idle_cnt <= '0;
      else if (int'(idle_cnt) < int'(DEAD_CYCLES)) idle_cnt <= idle_cnt + 1'b1;
    end
  end

  // The two switches of a half bridge must never conduct together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (rst) !(gate.s1 && gate.s2));

endmodule
