// sine_round: sinusoidal reference and nearest-level rounding.
//
// Once per sample_tick the module reads the next sine sample s (-1024..1024)
// from sine_lut, scales it by the modulation index and rounds the normalised
// upper-arm voltage to the nearest whole number of inserted submodules:
//
//   ms      = floor(s * k_term * K_SCALE / 1024)         (M*sin, 1024 = 1.0)
//   n_upper = floor((N_SM*(1024 - ms) + 1024) / 2048)    = round(N/2*(1 - M sin))
//   n_lower = N_SM - n_upper                             = round(N/2*(1 + M sin))
//
// For N_SM = 4 the middle line is the description's recipe: subtract the
// sine from 1024, double, add 512 for rounding, and divide by 1024 (a shift,
// so no divider is needed). The result is clamped to 0..N_SM so that an index
// above 1 saturates instead of wrapping. The table address advances by one per
// sample and wraps after SAMPLES samples, giving one fundamental period.
//
// Timing: n_upper, n_lower and sample_addr change in the cycle after
// sample_tick, together with the one-cycle strobe level_valid. sample_addr
// is the table index the current levels were computed from. Reset
// (asynchronous, active high) restarts the table at index 0 and sets both arms
// to N_SM/2, the level of a zero sine.
//
// The scaling by K_SCALE = 10 (k-term 92 -> M = 0.898) and the clamp are this
// design's reading; the rest follows the description.
module sine_round
  import nlm_pkg::*;
#(
  parameter int unsigned SAMPLES = SINE_SAMPLES
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sample_tick,
  input  kterm_t            k_term,
  output level_t            n_upper,
  output level_t            n_lower,
  output logic [ADDR_W-1:0] sample_addr,
  output logic              level_valid
);

  logic [ADDR_W-1:0] addr;
  sine_t             sine;
  level_t            n_next;

  sine_lut #(.SAMPLES(SAMPLES), .AMP(SINE_AMP)) u_lut (
    .addr (addr),
    .sine (sine)
  );

  always_comb begin
    int ms;
    int acc;
    int lvl;
    ms  = (int'(sine) * int'(k_term) * int'(K_SCALE)) >>> AMP_LOG2;
    acc = int'(N_SM) * (SINE_AMP - ms) + SINE_AMP;
    lvl = acc >>> (AMP_LOG2 + 1);
    if (lvl < 0)                 n_next = '0;
    else if (lvl > int'(N_SM))   n_next = LEVEL_W'(N_SM);
    else                         n_next = LEVEL_W'(lvl);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      addr        <= '0;
      sample_addr <= '0;
      n_upper     <= LEVEL_W'(N_SM / 2);
      n_lower     <= LEVEL_W'(N_SM / 2);
      level_valid <= 1'b0;
    end else begin
      level_valid <= sample_tick;
      if (sample_tick) begin
        n_upper     <= n_next;
        n_lower     <= LEVEL_W'(N_SM) - n_next;
        sample_addr <= addr;
        addr        <= (int'(addr) == int'(SAMPLES) - 1) ? '0 : addr + 1'b1;
      end
    end
  end

endmodule
