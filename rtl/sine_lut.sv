// sine_lut: read-only table of one period of the sine reference.
//
// Entry i holds round(AMP * sin(2*pi*i/SAMPLES)), so a unity-amplitude sine
// spans -AMP..+AMP (-1024..+1024 by default) over SAMPLES entries (400).
// The table is computed at elaboration time by a constant function, so no data
// file is needed; it synthesises to a ROM. The read is combinational: sine
// follows addr in the same cycle. Addresses at or above SAMPLES read 0.
//
// Storing the sine in a table and its scale and length follow the design
// description; the zero phase angle and the combinational read are this
// design's choices.
module sine_lut
  import nlm_pkg::*;
#(
  parameter int unsigned SAMPLES = SINE_SAMPLES,
  parameter int          AMP     = SINE_AMP
) (
  input  logic [ADDR_W-1:0] addr,
  output sine_t             sine
);

  typedef sine_t table_t [SAMPLES];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < int'(SAMPLES); i++) begin
      t[i] = SINE_W'($rtoi($floor(real'(AMP) *
                     $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(SAMPLES)) + 0.5)));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_comb begin
    if (int'(addr) < int'(SAMPLES)) sine = TABLE[addr];
    else                            sine = '0;
  end

endmodule
