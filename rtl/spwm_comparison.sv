// spwm_comparison: comparison subsystem of the two-level unipolar SPWM
// generator. Two comparators set Ta+ when the scaled sine ya1 is equal to or
// greater than the carrier and Tb+ when the inverted scaled sine ya2 is;
// Ta- and Tb- are their inverses. This follows the architecture exactly
// (the "equal to or greater" rule included). The output register, which
// keeps the gate signals free of comparator glitches, is this design's.
//
// Timing: one register stage. Reset (synchronous, active high) turns both
// lower switches on and both upper switches off (output shorted to 0 V).
module spwm_comparison
  import pwm_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  sample_t   ya1,
  input  sample_t   ya2,
  input  sample_t   carrier,
  output fb_gates_t gates
);

  logic cmp_a, cmp_b;
  assign cmp_a = (ya1 >= carrier);
  assign cmp_b = (ya2 >= carrier);

  always_ff @(posedge clk) begin
    if (rst) gates <= '{ta_p: 1'b0, ta_m: 1'b1, tb_p: 1'b0, tb_m: 1'b1};
    else     gates <= '{ta_p: cmp_a, ta_m: ~cmp_a, tb_p: cmp_b, tb_m: ~cmp_b};
  end

  // Each leg has exactly one switch on: no shoot-through.
  a_leg_a: assert property (@(posedge clk) disable iff (rst) gates.ta_p != gates.ta_m);
  a_leg_b: assert property (@(posedge clk) disable iff (rst) gates.tb_p != gates.tb_m);

endmodule
