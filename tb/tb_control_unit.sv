// tb_control_unit: drives control_unit (reduced to a 5-sample half sine
// and 7-sample carrier) with a random tick pattern and compares its outputs
// after every clock with a count of the ticks given: after n ticks the
// carrier address is n mod 7, the sine address (n div 7) mod 5 and the flag
// (n div 35) mod 2. Also checks that nothing moves without a tick and that
// reset clears everything.
module tb_control_unit;
  localparam int S = 5, C = 7;
  logic clk = 0, rst = 1, tick = 0;
  logic [2:0] sine_addr, carrier_addr;
  logic flag;
  int checks = 0, failures = 0;
  int unsigned n = 0;
  int flag_toggles = 0;
  logic flag_prev = 0;

  control_unit #(.SINE_HALF_N(S), .CARRIER_N(C)) dut (.clk, .rst, .tick, .sine_addr, .carrier_addr, .flag);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (sine_addr != 0 || carrier_addr != 0 || flag != 0) begin
      failures++; $display("FAIL: reset state");
    end
    repeat (5000) begin
      tick = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (tick) n++;
      checks++;
      if (carrier_addr != 3'(n % C) || sine_addr != 3'((n / C) % S) || flag != 1'((n / (C * S)) % 2)) begin
        failures++;
        $display("FAIL: n=%0d got c=%0d s=%0d f=%0d", n, carrier_addr, sine_addr, flag);
      end
      if (flag != flag_prev) flag_toggles++;
      flag_prev = flag;
    end
    checks++;
    if (flag_toggles < 10) begin failures++; $display("FAIL: flag toggled %0d times", flag_toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
