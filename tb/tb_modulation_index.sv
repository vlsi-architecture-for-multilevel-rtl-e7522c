// tb_modulation_index: drives IEEE-754 single-precision values into
// modulation_index and compares the Q2.8 result with round(M * 256),
// computed in real arithmetic and saturated to 0..1023; negative values,
// zero, subnormals give 0 and infinity/NaN saturate. Covers the operating
// range 0.85..1.25, exact powers of two, rounding ties and 1000 random
// values in [0, 4.5). Also checks the one-clock latency.
module tb_modulation_index;
  logic clk = 0, rst = 1;
  logic [31:0] m_float;
  logic [9:0]  index;
  int checks = 0, failures = 0;

  modulation_index dut (.clk, .rst, .m_float, .index);

  always #5 clk = ~clk;

  function automatic int expected(real m);
    real x;
    if (m <= 0.0) return 0;
    x = m * 256.0 + 0.5;
    if (x >= 1024.0) return 1023;
    return int'($floor(x));
  endfunction

  task automatic apply(input logic [31:0] bits, input int exp_v, input string what);
    m_float = bits;
    @(posedge clk); #1;
    checks++;
    if (index !== 10'(exp_v)) begin
      failures++;
      $display("FAIL: %s bits=%h got %0d expected %0d", what, bits, index, exp_v);
    end
  endtask

  // Single-precision encoding of m (mantissa truncated), built from the
  // double-precision bits, and the exact value that encoding stands for.
  function automatic logic [31:0] to_single(real m);
    logic [63:0] d;
    int e;
    d = $realtobits(m);
    if (m == 0.0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real single_value(logic [31:0] b);
    real v;
    if (b[30:23] == 8'd0) return 0.0;
    v = real'({1'b1, b[22:0]});
    for (int i = 0; i < int'(b[30:23]) - 150; i++) v = v * 2.0;
    for (int i = 0; i < 150 - int'(b[30:23]); i++) v = v / 2.0;
    return b[31] ? -v : v;
  endfunction

  task automatic apply_real(input real m);
    logic [31:0] b;
    b = to_single(m);
    apply(b, expected(single_value(b)), $sformatf("M=%f", m));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_float = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    apply_real(1.0);  apply_real(0.5);   apply_real(1.25); apply_real(0.85);
    apply_real(0.0);  apply_real(-0.5);  apply_real(2.0);  apply_real(3.99);
    apply_real(4.0);  apply_real(100.0); apply_real(1.0e-6);
    apply_real(0.001953125);           // exactly half an LSB: rounds up to 1
    apply_real(0.0009765625);          // quarter LSB: 0
    apply_real(3.998046875);           // 1023.5 rounds to 1024: saturates
    apply(32'h7F80_0000, 1023, "+inf");
    apply(32'h7FC0_0000, 1023, "NaN");
    apply(32'h0000_0001, 0, "subnormal");
    apply(32'h8000_0000, 0, "-0");
    for (int i = 0; i < 1000; i++)
      apply_real(4.5 * real'($urandom_range(0, 1000000)) / 1000000.0);
    for (int i = 0; i <= 40; i++)
      apply_real(0.85 + 0.01 * real'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
