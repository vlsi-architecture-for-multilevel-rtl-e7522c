// tb_tchb_workloads: runs the modulator at its default parameters over the
// modulation indices the inverter is specified for (0.85, 1.0 and the
// over-modulating 1.25), one full 20 ms output period each, and checks the
// voltage the power stages would produce.
//
// The TCHB gates drive the behavioural bridge model (325 V DC link); the
// full-bridge gates are turned into Va - Vb with the same 325 V. Over
// exactly one output period (1,000,000 clocks) the fundamental amplitude is
// taken by a discrete Fourier sum. The expected amplitude is worked out from
// PWM theory alone: the local average of either output is Vdc times the
// normalised reference (ya - 128) / 128, so the fundamental is Vdc times
// the fundamental of clamp(M * 127/128 * sin, -1, +127/128), integrated
// here numerically. Both outputs must be within 1.5 % of it. The total
// harmonic distortion of the unfiltered waveforms is also computed; the
// five-level output must have less than the three-level full-bridge output.
module tb_tchb_workloads;
  import pwm_pkg::*;

  localparam int    PERIOD = 1_000_000;
  localparam real   VDC    = 325.0;
  localparam real   PI     = 3.141592653589793;

  logic clk = 0, rst = 1;
  logic [31:0] m_float;
  fb_gates_t   fb_gates;
  tchb_gates_t tchb_gates;
  level_t      level;
  logic        flag;
  int          v_out_mv;
  logic        bridge_fault;
  int checks = 0, failures = 0;

  tchb_pwm_top dut (.clk, .rst, .m_float, .fb_gates, .tchb_gates, .level, .flag);
  tchb_bridge_model bridge (.gates(tchb_gates), .v_out_mv, .fault(bridge_fault));

  always #10 clk = ~clk;

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected_fundamental(real m);
    real a1 = 0.0, x, th;
    int n = 20000;
    for (int i = 0; i < n; i++) begin
      th = 2.0 * PI * (real'(i) + 0.5) / real'(n);
      x  = m * 127.0 / 128.0 * $sin(th);
      if (x > 127.0 / 128.0) x = 127.0 / 128.0;
      if (x < -1.0) x = -1.0;
      a1 += x * $sin(th);
    end
    return VDC * 2.0 * a1 / real'(n);
  endfunction

  task automatic run_index(input logic [31:0] bits, input real m);
    real s5 = 0, c5 = 0, q5 = 0, s3 = 0, c3 = 0, q3 = 0;
    real v5, v3, th, a5, a3, e, thd5, thd3;
    int faults = 0;
    @(negedge clk) m_float = bits;
    repeat (20) @(posedge clk);
    for (int i = 0; i < PERIOD; i++) begin
      @(posedge clk); #1;
      th = 2.0 * PI * real'(i) / real'(PERIOD);
      v5 = real'(v_out_mv) / 1000.0;
      v3 = (fb_gates.ta_p ? VDC : 0.0) - (fb_gates.tb_p ? VDC : 0.0);
      s5 += v5 * $sin(th);  c5 += v5 * $cos(th);  q5 += v5 * v5;
      s3 += v3 * $sin(th);  c3 += v3 * $cos(th);  q3 += v3 * v3;
      if (bridge_fault) faults++;
    end
    a5 = 2.0 * $sqrt(s5 * s5 + c5 * c5) / real'(PERIOD);
    a3 = 2.0 * $sqrt(s3 * s3 + c3 * c3) / real'(PERIOD);
    e  = expected_fundamental(m);
    thd5 = $sqrt(q5 / real'(PERIOD) - a5 * a5 / 2.0) / (a5 / $sqrt(2.0));
    thd3 = $sqrt(q3 / real'(PERIOD) - a3 * a3 / 2.0) / (a3 / $sqrt(2.0));
    $display("M=%4.2f fundamental: five-level %6.1f V, full bridge %6.1f V, expected %6.1f V; THD five-level %5.1f %%, three-level %5.1f %%",
             m, a5, a3, e, 100.0 * thd5, 100.0 * thd3);
    checks++;
    if ((a5 - e) * (a5 - e) > (0.015 * e) * (0.015 * e)) begin failures++; $display("FAIL: five-level fundamental"); end
    checks++;
    if ((a3 - e) * (a3 - e) > (0.015 * e) * (0.015 * e)) begin failures++; $display("FAIL: full-bridge fundamental"); end
    checks++;
    if (faults != 0) begin failures++; $display("FAIL: %0d bridge faults", faults); end
    checks++;
    if (!(thd5 < thd3)) begin failures++; $display("FAIL: five-level THD not below three-level"); end
  endtask

  initial begin
    m_float = 32'h3F80_0000;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    run_index(32'h3F59_999A, 0.85);   // nearest single to 0.85
    run_index(32'h3F80_0000, 1.0);
    run_index(32'h3FA0_0000, 1.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
