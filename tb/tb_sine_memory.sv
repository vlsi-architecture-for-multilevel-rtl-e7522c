// tb_sine_memory: reads every entry of the 200-entry half-wave sine table
// and compares it with round(128 + 127 sin(pi i / 200)); checks the
// one-clock read latency by changing the address right after each edge, and
// that the table peaks at 255 and starts at the zero line 128.
module tb_sine_memory;
  logic clk = 0;
  logic [7:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int maxv = 0;

  sine_memory dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    addr = 0;
    for (int i = 0; i < 200; i++) begin
      addr = 8'(i);
      @(posedge clk); #1;
      addr = 8'((i + 77) % 200);   // must not show before the next edge
      #1;
      e = 128 + int'($floor(127.0 * $sin(3.141592653589793 * real'(i) / 200.0) + 0.5));
      checks++;
      if (int'(data) != e) begin
        failures++; $display("FAIL: entry %0d got %0d expected %0d", i, data, e);
      end
      if (int'(data) > maxv) maxv = int'(data);
      if (i == 0) begin
        checks++;
        if (data != 8'd128) begin failures++; $display("FAIL: entry 0 not 128"); end
      end
    end
    checks++;
    if (maxv != 255) begin failures++; $display("FAIL: peak %0d", maxv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
