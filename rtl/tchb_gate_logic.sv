// tchb_gate_logic: switch-state table of the five-level transistor-clamped
// H-bridge (TCHB).
//
// The bridge has a left leg S2 (upper) / S3 (lower), a right leg S4 / S5,
// and a bidirectional switch S1 that ties the left leg's output to the
// midpoint of the two series DC capacitors. With Vc the voltage of one
// capacitor the output (left minus right) is:
//
//   level +2 : S2, S5        +2 Vc
//   level +1 : S1, S5        +1 Vc
//   level  0 : S3, S5  (positive half) or S2, S4 (negative half)
//   level -1 : S1, S4        -1 Vc
//   level -2 : S3, S4        -2 Vc
//
// so the right leg switches only at the fundamental frequency (S5 in the
// positive half, S4 in the negative) and the left leg with S1 at the carrier
// frequency. The switch names and the circuit follow the published bridge;
// the table itself is derived here from that circuit. In the positive half
// S3 gives the zero state and in the negative half S2 does, so that the
// right leg changes only at the half-period boundary; this choice is this
// design's. No dead time is inserted (none is specified).
//
// Timing: one register stage. Reset (synchronous, active high) applies the
// zero state S3 + S5.
module tchb_gate_logic
  import pwm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  level_t      level,
  input  logic        pos_half,
  output tchb_gates_t gates
);

  tchb_gates_t nxt;

  always_comb begin
    nxt = '0;
    // right leg: polarity of the half period
    if (level > 0)      nxt.s5 = 1'b1;
    else if (level < 0) nxt.s4 = 1'b1;
    else if (pos_half)  nxt.s5 = 1'b1;
    else                nxt.s4 = 1'b1;
    // left leg and clamp switch
    unique case (level)
      3'sd2:  nxt.s2 = 1'b1;
      3'sd1:  nxt.s1 = 1'b1;
      -3'sd1: nxt.s1 = 1'b1;
      -3'sd2: nxt.s3 = 1'b1;
      default: begin            // level 0
        if (nxt.s5) nxt.s3 = 1'b1;
        else        nxt.s2 = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) gates <= '{s1: 1'b0, s2: 1'b0, s3: 1'b1, s4: 1'b0, s5: 1'b1};
    else     gates <= nxt;
  end

  // Exactly one of S1, S2, S3 and one of S4, S5 conduct: no capacitor or
  // DC-link short.
  a_left:  assert property (@(posedge clk) disable iff (rst) $onehot({gates.s1, gates.s2, gates.s3}));
  a_right: assert property (@(posedge clk) disable iff (rst) $onehot({gates.s4, gates.s5}));

endmodule
