// tchb_bridge_model: behavioural model (not synthesizable logic) of the
// power stage of a five-level transistor-clamped H-bridge, for testbenches.
//
// Two series capacitors each hold half of the DC-link voltage VDC_MV
// (millivolts; 325 V by default). The left leg output is tied to the top
// rail by S2, to the capacitor midpoint by S1 (a bidirectional switch) or to
// the bottom rail by S3; the right leg output to the top rail by S4 or the
// bottom rail by S5. v_out_mv is the left minus the right leg potential.
// `fault` is raised when a gate pattern would short a capacitor or the DC
// link (two switches of a group on) or leave a leg floating (none on); the
// output is then reported as 0. The model is ideal: no dead time, no
// voltage drops, instantaneous switching.
module tchb_bridge_model
  import pwm_pkg::*;
#(
  parameter int VDC_MV = 325000
) (
  input  tchb_gates_t gates,
  output int          v_out_mv,
  output logic        fault
);

  int left_mv, right_mv;

  always_comb begin
    fault    = 1'b0;
    left_mv  = 0;
    right_mv = 0;
    unique case ({gates.s1, gates.s2, gates.s3})
      3'b010:  left_mv = VDC_MV;
      3'b100:  left_mv = VDC_MV / 2;
      3'b001:  left_mv = 0;
      default: fault = 1'b1;
    endcase
    unique case ({gates.s4, gates.s5})
      2'b10:   right_mv = VDC_MV;
      2'b01:   right_mv = 0;
      default: fault = 1'b1;
    endcase
    v_out_mv = fault ? 0 : left_mv - right_mv;
  end

endmodule
