// tb_amplitude_scaler: random and corner-case test of the adjustable
// amplitude stage. Expected output, computed in real arithmetic:
// clamp(floor(128 + (ref - 128) * index / 256 + 0.5), 0, 255), one clock
// after the inputs. Covers index 0, 1.0 (output equals input), 0.85 and
// 1.25 (over-modulation, where clipping must happen), and the full index
// range; counts the clipped cases.
module tb_amplitude_scaler;
  logic clk = 0, rst = 1;
  logic [7:0] ref_in, ya;
  logic [9:0] index;
  int checks = 0, failures = 0, clipped = 0;

  amplitude_scaler dut (.clk, .rst, .ref_in, .index, .ya);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int r, int ix);
    real y;
    int v;
    y = 128.0 + real'(r - 128) * real'(ix) / 256.0;
    v = int'($floor(y + 0.5));
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  task automatic apply(input int r, input int ix);
    int e;
    ref_in = 8'(r);
    index  = 10'(ix);
    @(posedge clk); #1;
    e = model(r, ix);
    checks++;
    if (int'(ya) != e) begin
      failures++;
      $display("FAIL: ref=%0d index=%0d got %0d expected %0d", r, ix, ya, e);
    end
    if (ix > 256 && (e == 0 || e == 255)) clipped++;
  endtask

  initial begin
    ref_in = 128; index = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ya != 8'd128) begin failures++; $display("FAIL: reset value"); end
    rst = 0;
    for (int r = 0; r < 256; r++) begin
      apply(r, 0); apply(r, 256); apply(r, 218); apply(r, 320);
    end
    for (int i = 0; i < 20000; i++)
      apply($urandom_range(0, 255), $urandom_range(0, 1023));
    checks++;
    if (clipped == 0) begin failures++; $display("FAIL: no clipping seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
