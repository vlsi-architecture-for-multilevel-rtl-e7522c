// tb_sine_carrier: runs the sine-carrier subsystem at its default sizes
// (200-sample half sine, 510-sample carrier) for one full fundamental
// period plus a little, with a tick on two clocks out of three. After n
// ticks (seen one clock later because of the memory read) it expects
//   carrier = triangle(n mod 510),
//   j = (n div 510) mod 400, s = round(128 + 127 sin(pi (j mod 200) / 200)),
//   ref1 = s in the first half (j < 200) and 256 - s in the second,
//   ref2 = 256 - ref1, flag = (j >= 200).
// It also counts both flag edges so that the half-period switch is seen.
module tb_sine_carrier;
  logic clk = 0, rst = 1, tick = 0;
  logic [7:0] ref1, ref2, carrier;
  logic flag;
  int checks = 0, failures = 0;
  int unsigned n = 0;
  int rises = 0, falls = 0;
  logic flag_prev = 0;

  sine_carrier dut (.clk, .rst, .tick, .ref1, .ref2, .carrier, .flag);

  always #5 clk = ~clk;

  initial begin
    #5000000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sine_at(int j);
    int s;
    s = 128 + int'($floor(127.0 * $sin(3.141592653589793 * real'(j % 200) / 200.0) + 0.5));
    return (j < 200) ? s : 256 - s;
  endfunction

  initial begin
    int c, j, e1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 310000; k++) begin
      tick = (k % 3 != 2);
      @(posedge clk); #1;
      // outputs now reflect the addresses held before this edge, i.e. after
      // the n ticks given on earlier edges
      c  = int'(n % 510);
      j  = int'((n / 510) % 400);
      e1 = sine_at(j);
      checks++;
      if (int'(carrier) != ((c <= 255) ? c : 510 - c) || int'(ref1) != e1 ||
          int'(ref2) != 256 - e1 || flag != (j >= 200)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: n=%0d carrier=%0d ref1=%0d ref2=%0d flag=%0d expected c=%0d r1=%0d",
                   n, carrier, ref1, ref2, flag, c, e1);
      end
      if (flag && !flag_prev) rises++;
      if (!flag && flag_prev) falls++;
      flag_prev = flag;
      if (tick) n++;
    end
    checks++;
    if (rises < 1 || falls < 1) begin failures++; $display("FAIL: flag edges %0d/%0d", rises, falls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
