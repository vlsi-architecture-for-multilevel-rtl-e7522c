// amplitude_scaler: adjustable-amplitude sine (sineRef1 / sineRef2 of the
// architecture). It scales a constant-amplitude reference sample about the
// zero line 128 by the fixed-point modulation index:
//
//   y_a = clamp(128 + round((ref - 128) * index / 2^INDEX_FRAC), 0, 255)
//
// so index = 1.0 reproduces the reference and index = 0 gives a flat 128.
// Indices above 1.0 over-modulate; the result is then clipped to the 0..255
// range, which flattens the peaks of the reference. The scaling about 128 and
// the 0..255 output range follow the architecture; rounding half up and the
// clipping are this design's choices.
//
// Timing: one register stage. Reset (synchronous, active high) sets 128.
module amplitude_scaler
  import pwm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t ref_in,
  input  index_t  index,
  output sample_t ya
);

  localparam int PW = DATA_W + INDEX_W + 2;

  logic signed [DATA_W:0]  dev;     // ref - 128, -128 .. 127
  logic signed [PW-1:0]    prod;
  logic signed [PW-1:0]    scaled;
  logic signed [PW-1:0]    y_full;
  sample_t                 y_sat;

  assign dev    = $signed({1'b0, ref_in}) - $signed((DATA_W+1)'(MID));
  assign prod   = PW'(dev) * $signed({2'b00, index});
  assign scaled = (prod + PW'(1 << (INDEX_FRAC - 1))) >>> INDEX_FRAC;
  assign y_full = scaled + PW'(MID);

  always_comb begin
    if (y_full < 0)                       y_sat = '0;
    else if (y_full > PW'((1 << DATA_W) - 1)) y_sat = '1;
    else                                  y_sat = sample_t'(y_full);
  end

  always_ff @(posedge clk) begin
    if (rst) ya <= sample_t'(MID);
    else     ya <= y_sat;
  end

endmodule
