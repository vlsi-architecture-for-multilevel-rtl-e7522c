// pd_modulator: phase-disposition (PD) level-shifted multicarrier PWM for a
// five-level inverter.
//
// Four triangular carriers of equal amplitude are stacked one over the other
// so that together they span the 0..255 range of the reference, all in the
// same phase (the PD arrangement). They are derived from the one full-scale
// carrier sample: carrier k (k = 0 bottom .. 3 top) is
// k * 64 + carrier / 4, covering [64k, 64k + 63]. Each carrier is compared
// with the reference ("equal to or greater than" sets the comparator, as in
// the two-level generator), and the number of carriers the reference is at
// or above, 0..4, less 2 gives the output level -2..+2: +2 above every
// carrier, +1 above all but the top one, 0 between the two middle ones,
// -1 above only the bottom one and -2 below all. pos_half is 1 while the
// reference is at or above the zero line 128; the gate logic uses it to pick
// the zero state. Four equal, stacked, in-phase carriers against one sine
// is the phase-disposition method the inverter is specified with; deriving
// the carriers from one carrier table is this design's choice.
//
// Timing: one register stage. Reset (synchronous, active high) gives level 0.
module pd_modulator
  import pwm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t ref_in,
  input  sample_t carrier,
  output level_t  level,
  output logic    pos_half,
  output logic [3:0] above      // comparator outputs, bit k for carrier k
);

  localparam int unsigned NC   = 4;
  localparam int unsigned BAND = (1 << DATA_W) / NC;   // 64

  logic [NC-1:0] cmp;
  logic [2:0]    count;

  always_comb begin
    count = '0;
    for (int k = 0; k < int'(NC); k++) begin
      cmp[k] = (ref_in >= sample_t'(k * BAND) + (carrier >> $clog2(NC)));
      count  = count + 3'(cmp[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      level    <= '0;
      pos_half <= 1'b1;
      above    <= 4'b0011;
    end else begin
      level    <= level_t'($signed({1'b0, count}) - 4'sd2);
      pos_half <= (ref_in >= sample_t'(MID));
      above    <= cmp;
    end
  end

endmodule
