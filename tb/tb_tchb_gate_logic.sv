// tb_tchb_gate_logic: applies every level (-2..+2) in both half periods,
// then a random level sequence, and checks the gate pattern by what it does
// to the bridge: the left leg sits at 2 (S2), 1 (S1, capacitor midpoint) or
// 0 (S3) capacitor voltages, the right leg at 2 (S4) or 0 (S5); the output
// left - right must equal the level, with exactly one switch on in each
// group, and for level 0 the positive half must use S3+S5 and the negative
// half S2+S4. Latency one clock; reset state S3+S5.
module tb_tchb_gate_logic;
  import pwm_pkg::*;
  logic clk = 0, rst = 1;
  level_t level;
  logic pos_half;
  tchb_gates_t gates;
  int checks = 0, failures = 0;

  tchb_gate_logic dut (.clk, .rst, .level, .pos_half, .gates);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int lv, input bit pos);
    int left, right;
    level = level_t'(lv);
    pos_half = pos;
    @(posedge clk); #1;
    left  = gates.s2 ? 2 : (gates.s1 ? 1 : 0);
    right = gates.s4 ? 2 : 0;
    checks++;
    if (int'(gates.s1) + int'(gates.s2) + int'(gates.s3) != 1 ||
        int'(gates.s4) + int'(gates.s5) != 1 || left - right != lv) begin
      failures++;
      $display("FAIL: level=%0d pos=%0d gates=%b", lv, pos, gates);
    end
    if (lv == 0) begin
      checks++;
      if ((pos && !(gates.s3 && gates.s5)) || (!pos && !(gates.s2 && gates.s4))) begin
        failures++;
        $display("FAIL: zero state pos=%0d gates=%b", pos, gates);
      end
    end
    if (lv > 0) begin
      checks++;
      if (!gates.s5) begin failures++; $display("FAIL: positive level without S5"); end
    end
  endtask

  initial begin
    level = 0; pos_half = 1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (gates != 5'b00101) begin failures++; $display("FAIL: reset state %b", gates); end
    rst = 0;
    for (int lv = -2; lv <= 2; lv++) begin
      apply(lv, 1'b1);
      apply(lv, 1'b0);
    end
    for (int i = 0; i < 500; i++) begin
      int lv;
      lv = $urandom_range(0, 4) - 2;
      apply(lv, lv > 0 ? 1'b1 : (lv < 0 ? 1'b0 : 1'($urandom)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
