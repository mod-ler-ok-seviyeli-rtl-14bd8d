// nlm_pkg: constants and types shared by the nearest-level-modulation (NLM)
// gate controller of a single-phase, five-level modular multilevel converter.
//
// The converter has N_SM half-bridge submodules (HBSMs) in each of its two arms.
// Each HBSM has two complementary switches, S1 (inserts the capacitor) and S2
// (bypasses it); the pair is carried as gate_pair_t. The sine reference is a
// table of SINE_SAMPLES samples per fundamental period, scaled so that a unity
// sine spans -SINE_AMP..+SINE_AMP. The modulation index is given as an integer
// k-term with M = k * K_SCALE / SINE_AMP (k = 92 gives M = 0.898).
//
// Four submodules per arm, 400 samples, the +-1024 scale and the k-term table
// come from the design description; K_SCALE = 10 is this design's reading of
// how a k-term near 100*M maps onto the 1024 scale.
package nlm_pkg;

  localparam int unsigned N_SM         = 4;     // HBSMs per arm
  localparam int unsigned AMP_LOG2     = 10;
  localparam int          SINE_AMP     = 1 << AMP_LOG2;  // 1024 = unity sine
  localparam int unsigned SINE_SAMPLES = 400;   // samples per 20 ms period
  localparam int unsigned SINE_W       = AMP_LOG2 + 2;   // signed, holds +-1024
  localparam int unsigned ADDR_W       = $clog2(SINE_SAMPLES);
  localparam int unsigned LEVEL_W      = $clog2(N_SM + 1);  // 0..N_SM
  localparam int unsigned K_W          = 7;     // k-term, 0..127
  localparam int unsigned K_SCALE      = 10;    // M = k*K_SCALE/SINE_AMP

  typedef logic signed [SINE_W-1:0] sine_t;
  typedef logic [LEVEL_W-1:0]       level_t;
  typedef logic [K_W-1:0]           kterm_t;

  // Gate commands of one HBSM. s1 = upper switch (capacitor inserted),
  // s2 = lower switch (capacitor bypassed).
  typedef struct packed {
    logic s1;
    logic s2;
  } gate_pair_t;

  localparam gate_pair_t GATE_ON  = '{s1: 1'b1, s2: 1'b0};  // SM inserted, gives Vc
  localparam gate_pair_t GATE_OFF = '{s1: 1'b0, s2: 1'b1};  // SM bypassed, gives 0
  localparam gate_pair_t GATE_IDLE = '{s1: 1'b0, s2: 1'b0}; // both switches open

endpackage
