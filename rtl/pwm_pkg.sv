// pwm_pkg: types and constants shared by the SPWM / phase-disposition PWM
// modulator.
//
// Sample values follow the unsigned 8-bit convention of the architecture: a
// sine that mathematically spans [-1, 1] is held in [0, 255] with the zero
// line at 128. The modulation index is carried in unsigned fixed point with
// INDEX_FRAC fractional bits; the format (Q2.8) is this design's choice, made
// wide enough for the 0.85..1.25 range the inverter is operated in.
package pwm_pkg;

  localparam int unsigned DATA_W     = 8;     // sample width, range 0..255
  localparam int unsigned MID        = 128;   // digital zero line
  localparam int unsigned INDEX_W    = 10;    // modulation index width
  localparam int unsigned INDEX_FRAC = 8;     // fractional bits, 1.0 = 256

  typedef logic [DATA_W-1:0]  sample_t;
  typedef logic [INDEX_W-1:0] index_t;

  // Five-level output command of the transistor-clamped H-bridge, in units
  // of one capacitor voltage: -2 .. +2.
  typedef logic signed [2:0] level_t;

  // Gate signals of the full bridge driven by the two-level unipolar SPWM.
  typedef struct packed {
    logic ta_p;
    logic ta_m;
    logic tb_p;
    logic tb_m;
  } fb_gates_t;

  // Gate signals of the five switches of the transistor-clamped H-bridge.
  typedef struct packed {
    logic s1;   // bidirectional clamp switch to the capacitor midpoint
    logic s2;   // left leg, upper
    logic s3;   // left leg, lower
    logic s4;   // right leg, upper
    logic s5;   // right leg, lower
  } tchb_gates_t;

endpackage
