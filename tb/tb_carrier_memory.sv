// tb_carrier_memory: reads all 510 entries of the triangular carrier table
// and checks the triangle 0, 1, .., 255, 254, .., 1 (entry i is i up to 255
// and 510 - i after), with the one-clock read latency.
module tb_carrier_memory;
  logic clk = 0;
  logic [8:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  carrier_memory dut (.clk, .addr, .data);

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
    for (int i = 0; i < 510; i++) begin
      addr = 9'(i);
      @(posedge clk); #1;
      addr = 9'((i + 100) % 510);
      #1;
      e = (i <= 255) ? i : 510 - i;
      checks++;
      if (int'(data) != e) begin
        failures++; $display("FAIL: entry %0d got %0d expected %0d", i, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
