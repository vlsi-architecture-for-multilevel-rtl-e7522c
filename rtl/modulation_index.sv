// modulation_index: converts the modulation index M, given as an IEEE-754
// single-precision number, to the unsigned fixed-point value `index` used by
// the amplitude scalers.
//
// The architecture takes M as a floating-point input and turns it into fixed
// point; how it does so is this design's own: the 24-bit significand (hidden
// bit restored) is shifted by the unbiased exponent so that the result has
// INDEX_FRAC fractional bits, rounding half up. Negative numbers, zeros and
// subnormals give 0; values that do not fit INDEX_W bits, infinities and
// NaNs saturate to the largest code. With the default Q2.8 format, 1.0 maps
// to 256 and 1.25 to 320.
//
// Timing: one register stage; index follows m_float one clock later.
// Reset (synchronous, active high) clears index to 0.
module modulation_index
  import pwm_pkg::*;
#(
  parameter int unsigned IW = INDEX_W,
  parameter int unsigned FB = INDEX_FRAC
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [31:0]   m_float,
  output logic [IW-1:0] index
);

  logic        sign;
  logic [7:0]  exp_b;
  logic [23:0] signif;
  logic [IW-1:0] conv;

  assign sign   = m_float[31];
  assign exp_b  = m_float[30:23];
  assign signif = {1'b1, m_float[22:0]};

  // value * 2^FB = signif * 2^(exp_b - 127 - 23 + FB)
  always_comb begin
    int sh;           // left shift amount (negative: right shift)
    logic [63:0] wide;
    logic [24:0] rnd;
    conv = '0;
    wide = '0;
    rnd  = '0;
    sh   = int'(exp_b) - 150 + int'(FB);
    if (sign || exp_b == 8'd0) begin
      conv = '0;
    end else if (exp_b == 8'hFF) begin
      conv = '1;
    end else if (sh >= 0) begin
      if (sh + 24 > int'(IW)) begin
        conv = '1;
      end else begin
        wide = 64'(signif) << sh;
        conv = IW'(wide);
      end
    end else if (sh >= -24) begin
      // round half up: add half an LSB of the result, then shift
      rnd  = 25'(signif) + (25'd1 << (-sh - 1));
      wide = 64'(rnd >> (-sh));
      if (wide >= (64'd1 << IW)) conv = '1;
      else                       conv = IW'(wide);
    end else begin
      conv = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) index <= '0;
    else     index <= conv;
  end

endmodule
