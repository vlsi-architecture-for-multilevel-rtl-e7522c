// tb_spwm_comparison: checks the two-level comparison stage on every pair
// (sine, carrier) for both comparators, including the equality case where
// the upper switch must be on, and that Ta-/Tb- are the complements of
// Ta+/Tb+, one clock after the inputs. Also checks the reset state.
module tb_spwm_comparison;
  import pwm_pkg::*;
  logic clk = 0, rst = 1;
  sample_t ya1, ya2, carrier;
  fb_gates_t gates;
  int checks = 0, failures = 0;

  spwm_comparison dut (.clk, .rst, .ya1, .ya2, .carrier, .gates);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ya1 = 0; ya2 = 0; carrier = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (gates != 4'b0101) begin failures++; $display("FAIL: reset state %b", gates); end
    rst = 0;
    for (int a = 0; a < 256; a++) begin
      for (int c = 0; c < 256; c += 3) begin
        ya1 = 8'(a); ya2 = 8'(255 - a); carrier = 8'(c);
        @(posedge clk); #1;
        checks++;
        if (gates.ta_p != (a >= c) || gates.ta_m != (a < c) ||
            gates.tb_p != (255 - a >= c) || gates.tb_m != (255 - a < c)) begin
          failures++;
          $display("FAIL: ya1=%0d ya2=%0d c=%0d gates=%b", a, 255 - a, c, gates);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
