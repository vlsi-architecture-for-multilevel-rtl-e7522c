// tchb_pwm_top: digital modulator for a single-phase inverter. From a board
// clock and a floating-point modulation index M it produces
//   * fb_gates   - the four gate signals Ta+/Ta-/Tb+/Tb- of a full bridge,
//                  by unipolar sinusoidal PWM (two opposite-phase sines
//                  against one triangular carrier), and
//   * tchb_gates - the five gate signals S1..S5 of a five-level
//                  transistor-clamped H-bridge, by phase-disposition PWM
//                  (one sine against four stacked in-phase carriers).
// Both share one datapath:
//
//   clock_generator -> tick (sample-rate enable)
//   modulation_index : M (IEEE-754 single) -> Q2.8 index
//   sine_carrier     : control unit, sine/carrier ROMs, processing unit and
//                      multiplexers -> ref1, ref2, carrier
//   amplitude_scaler x2 (sineRef1, sineRef2) -> ya1, ya2
//   delay_line       : carrier delayed to line up with ya1/ya2
//   spwm_comparison  : ya1/ya2 vs carrier -> fb_gates
//   pd_modulator     : ya1 vs four level-shifted carriers -> level
//   tchb_gate_logic  : level -> tchb_gates
//
// With the defaults (50 MHz clock, 10.2 MHz sample rate, 510-sample carrier,
// 200-sample half sine) the switching frequency is 20 kHz and the output
// fundamental 50 Hz. Latency from a control-unit address change: fb_gates
// 3 clocks, level 3 clocks, tchb_gates 4 clocks. `level` is the five-level
// command (-2..+2) and `flag` the half-period flag, for observation.
// Reset is synchronous and active high.
module tchb_pwm_top
  import pwm_pkg::*;
#(
  parameter int unsigned CLKFX_MULTIPLY = 51,
  parameter int unsigned CLKFX_DIVIDE   = 125,
  parameter int unsigned SINE_HALF_N    = 200,
  parameter int unsigned CARRIER_N      = 510
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] m_float,
  output fb_gates_t   fb_gates,
  output tchb_gates_t tchb_gates,
  output level_t      level,
  output logic        flag
);

  logic    tick;
  index_t  index;
  sample_t ref1, ref2, carrier, carrier_d, ya1, ya2;
  logic    pos_half;


  clock_generator #(
    .CLKFX_MULTIPLY(CLKFX_MULTIPLY), .CLKFX_DIVIDE(CLKFX_DIVIDE)
  ) u_clkgen (
    .clk, .rst, .div2(), .tick
  );

  modulation_index u_mi (
    .clk, .rst, .m_float, .index
  );

  sine_carrier #(
    .SINE_HALF_N(SINE_HALF_N), .CARRIER_N(CARRIER_N)
  ) u_sc (
    .clk, .rst, .tick, .ref1, .ref2, .carrier, .flag
  );

  amplitude_scaler u_ref1 (.clk, .rst, .ref_in(ref1), .index, .ya(ya1));
  amplitude_scaler u_ref2 (.clk, .rst, .ref_in(ref2), .index, .ya(ya2));

  delay_line #(.WIDTH(DATA_W), .DEPTH(1)) u_delay (
    .clk, .rst, .din(carrier), .dout(carrier_d)
  );

  spwm_comparison u_cmp (
    .clk, .rst, .ya1, .ya2, .carrier(carrier_d), .gates(fb_gates)
  );

  pd_modulator u_pd (
    .clk, .rst, .ref_in(ya1), .carrier(carrier_d), .level, .pos_half, .above()
  );

  tchb_gate_logic u_gl (
    .clk, .rst, .level, .pos_half, .gates(tchb_gates)
  );

endmodule
