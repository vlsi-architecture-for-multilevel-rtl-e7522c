// sine_processing_unit: produces the two constant-amplitude, opposite-phase
// reference sines from the stored half-wave (processing unit, MUX1 and MUX2
// of the sine-carrier subsystem).
//
// The processing unit mirrors a stored sample about the zero line 128:
// ys = 2*128 - sine_data, so a value 128 + a becomes 128 - a. During the
// first half period (flag = 0) MUX1 passes the stored sample and MUX2 the
// mirrored one; during the second half (flag = 1) they swap. ref1 is thus a
// full sine and ref2 the same sine inverted. The mirroring about 128 and the
// flag-driven swap are read from the architecture's block diagram; the exact
// formula is this design's.
//
// Purely combinational.
module sine_processing_unit
  import pwm_pkg::*;
(
  input  sample_t sine_data,
  input  logic    flag,
  output sample_t ref1,
  output sample_t ref2
);

  logic [DATA_W:0] ys_wide;
  sample_t         ys;

  assign ys_wide = (DATA_W+1)'(2 * MID) - {1'b0, sine_data};
  // sine_data >= 1 keeps ys within 8 bits; 0 would give 256, clamp it
  assign ys      = ys_wide[DATA_W] ? '1 : ys_wide[DATA_W-1:0];

  assign ref1 = flag ? ys : sine_data;
  assign ref2 = flag ? sine_data : ys;

endmodule
