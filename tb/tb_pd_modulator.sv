// tb_pd_modulator: checks the phase-disposition comparison on all
// (reference, carrier) pairs. The four carriers are worked out here as real
// numbers: carrier k spans [64k, 64k + 63.75) and equals 64k + c/4 for a
// full-scale carrier sample c, sampled (truncated) to an integer; the level
// is the number of carriers the reference is at or above, minus 2. Also
// checks pos_half (reference at or above 128), that all five levels occur
// and the one-clock latency.
module tb_pd_modulator;
  import pwm_pkg::*;
  logic clk = 0, rst = 1;
  sample_t ref_in, carrier;
  level_t level;
  logic pos_half;
  logic [3:0] above;
  int checks = 0, failures = 0;
  int seen [5];

  pd_modulator dut (.clk, .rst, .ref_in, .carrier, .level, .pos_half, .above);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt;
    real ck;
    ref_in = 0; carrier = 0;
    for (int i = 0; i < 5; i++) seen[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 256; r++) begin
      for (int c = 0; c < 256; c += 5) begin
        ref_in = 8'(r); carrier = 8'(c);
        @(posedge clk); #1;
        cnt = 0;
        for (int k = 0; k < 4; k++) begin
          ck = $floor(64.0 * real'(k) + real'(c) / 4.0);
          if (real'(r) >= ck) cnt++;
        end
        checks++;
        if (int'(level) != cnt - 2 || pos_half != (r >= 128) || $countones(above) != cnt) begin
          failures++;
          $display("FAIL: ref=%0d c=%0d level=%0d expected %0d", r, c, level, cnt - 2);
        end
        seen[cnt]++;
      end
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL: level %0d never seen", i - 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
