// tb_clock_generator: checks the halving FSM and the fractional sample-rate
// enable of clock_generator at its default ratio 51/125.
//
// Reference: after the k-th clock edge since reset the FSM has been in its
// second phase floor(k/2) times, so the number of tick pulses must be
// floor(51 * floor(k/2) / 125); div2 must alternate every clock and a tick
// may only follow an edge in the second phase. Over 2500 clocks exactly 510
// ticks are expected (f_clk * 51 / 250).
module tb_clock_generator;
  logic clk = 0, rst = 1;
  logic div2, tick;
  int checks = 0, failures = 0;
  int unsigned edges = 0, ticks = 0;
  logic div2_prev;

  clock_generator dut (.clk, .rst, .div2, .tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (edge %0d)", what, edges);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    div2_prev = div2;
    repeat (2500) begin
      @(posedge clk); #1;
      edges++;
      if (tick) ticks++;
      check(div2 != div2_prev, "div2 alternates");
      div2_prev = div2;
      if (tick) check(!div2, "tick follows the second FSM phase");
      check(ticks == (51 * (edges / 2)) / 125, $sformatf("tick count %0d", ticks));
    end
    check(ticks == 510, "510 ticks in 2500 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
