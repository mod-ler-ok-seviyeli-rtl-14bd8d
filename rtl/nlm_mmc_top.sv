// nlm_mmc_top: nearest-level-modulation gate controller for a single-phase,
// five-level modular multilevel converter with N_SM = 4 half-bridge
// submodules per arm.
//
// Data flow, all on the 100 MHz master clock:
//   clk_div      -> sample_tick every 2*HALF_COUNT cycles (50 us, 400 per 20 ms)
//   sine_round   -> n_upper = round(2*(1 - M sin)), n_lower = 4 - n_upper
//   sm_on/sm_off -> the inserted / bypassed switch patterns (open in reset)
//   arm_gate x2  -> per-submodule commands for the upper and lower arm
//   dead_time x8 -> final gate pulses, with DEAD_CYCLES (200 ns) between the
//                   turn-off of one switch of a submodule and turn-on of the other
//
// Ports: clk and an active-high reset in; S1 and S2 gate pulses of the four
// upper-arm and four lower-arm submodules out (index 0 = submodule 1), 18
// signals in all. The modulation index is fixed at build time through the
// k-term K_TERM (M = K_TERM*10/1024; 92, 82, 72, 62 give M = 0.9, 0.8, 0.7,
// 0.6; 0 holds both arms at N = 2).
//
// Timing: the gate commands change two cycles after each sample_tick; a
// switch turning on follows DEAD_CYCLES cycles after its partner turned off,
// one turning off follows one cycle after the command.
//
// The divided clock (sine_clk) and the table index (sample_addr) are not used
// inside the top: the sample strobe carries the timing, and the index is kept
// for observation in simulation.
//
// Structure, sizes and numbers follow the description; the single clock with
// a sample strobe, the fixed submodule order and the reset levels are this
// design's choices.
module nlm_mmc_top
  import nlm_pkg::*;
#(
  parameter int unsigned HALF_COUNT  = 2500,  // master cycles per half sample period
  parameter int unsigned K_TERM      = 92,    // modulation index k-term (M = 0.9)
  parameter int unsigned DEAD_CYCLES = 20     // 200 ns at 100 MHz
) (
  input  logic            clk,
  input  logic            rst,
  output logic [N_SM-1:0] upper_s1,
  output logic [N_SM-1:0] upper_s2,
  output logic [N_SM-1:0] lower_s1,
  output logic [N_SM-1:0] lower_s2
);

  if (K_TERM >= (1 << K_W)) begin : g_bad_k
    $error("K_TERM must fit in %0d bits", K_W);
  end

  logic              sine_clk;
  logic              sample_tick;
  level_t            n_upper, n_lower;
  logic [ADDR_W-1:0] sample_addr;
  logic              level_valid;
  gate_pair_t        on_pattern, off_pattern;
  gate_pair_t        upper_cmd [N_SM];
  gate_pair_t        lower_cmd [N_SM];
  gate_pair_t        upper_gate [N_SM];
  gate_pair_t        lower_gate [N_SM];

  clk_div #(.HALF_COUNT(HALF_COUNT)) u_clk_div (
    .clk         (clk),
    .rst         (rst),
    .clk_out     (sine_clk),
    .sample_tick (sample_tick)
  );

  sine_round #(.SAMPLES(SINE_SAMPLES)) u_sine_round (
    .clk         (clk),
    .rst         (rst),
    .sample_tick (sample_tick),
    .k_term      (K_W'(K_TERM)),
    .n_upper     (n_upper),
    .n_lower     (n_lower),
    .sample_addr (sample_addr),
    .level_valid (level_valid)
  );

  sm_on  u_sm_on  (.clk(clk), .rst(rst), .pattern(on_pattern));
  sm_off u_sm_off (.clk(clk), .rst(rst), .pattern(off_pattern));

  arm_gate u_upper_arm (
    .clk         (clk),
    .rst         (rst),
    .level_valid (level_valid),
    .n_active    (n_upper),
    .on_pattern  (on_pattern),
    .off_pattern (off_pattern),
    .gates       (upper_cmd)
  );

  arm_gate u_lower_arm (
    .clk         (clk),
    .rst         (rst),
    .level_valid (level_valid),
    .n_active    (n_lower),
    .on_pattern  (on_pattern),
    .off_pattern (off_pattern),
    .gates       (lower_cmd)
  );

  for (genvar i = 0; i < int'(N_SM); i++) begin : g_sm
    dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_dt_upper (
      .clk (clk), .rst (rst), .cmd (upper_cmd[i]), .gate (upper_gate[i])
    );
    dead_time #(.DEAD_CYCLES(DEAD_CYCLES)) u_dt_lower (
      .clk (clk), .rst (rst), .cmd (lower_cmd[i]), .gate (lower_gate[i])
    );
    assign upper_s1[i] = upper_gate[i].s1;
    assign upper_s2[i] = upper_gate[i].s2;
    assign lower_s1[i] = lower_gate[i].s1;
    assign lower_s2[i] = lower_gate[i].s2;
  end

endmodule
