// tb_delay_line: feeds random 8-bit words into a 3-stage delay_line and a
// 1-stage one (the depth used for the carrier) and checks that each output
// equals the input of 3 (1) clocks before.
module tb_delay_line;
  logic clk = 0, rst = 1;
  logic [7:0] din, d3, d1;
  logic [7:0] hist [4];
  int checks = 0, failures = 0;

  delay_line #(.WIDTH(8), .DEPTH(3)) dut3 (.clk, .rst, .din, .dout(d3));
  delay_line #(.WIDTH(8), .DEPTH(1)) dut1 (.clk, .rst, .din, .dout(d1));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 4; i++) hist[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      din = 8'($urandom);
      @(posedge clk); #1;
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      if (i >= 3) begin
        checks++;
        if (d3 != hist[2] || d1 != hist[0]) begin
          failures++; $display("FAIL: i=%0d d3=%0d d1=%0d", i, d3, d1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
