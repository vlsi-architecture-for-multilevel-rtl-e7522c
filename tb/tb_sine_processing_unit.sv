// tb_sine_processing_unit: exhaustive test of the mirror-and-select stage.
// For every stored sample s (1..255, the range the sine table uses, plus 0)
// and both flag values: with flag 0, ref1 = s and ref2 = 256 - s; with flag
// 1 the two swap. Also checks that ref1 and ref2 are symmetric about 128.
module tb_sine_processing_unit;
  logic [7:0] sine_data, ref1, ref2;
  logic flag;
  int checks = 0, failures = 0;

  sine_processing_unit dut (.sine_data, .flag, .ref1, .ref2);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    for (int f = 0; f < 2; f++) begin
      for (int s = 0; s < 256; s++) begin
        sine_data = 8'(s);
        flag = 1'(f);
        #1;
        m = (s == 0) ? 255 : 256 - s;
        checks++;
        if (int'(ref1) != (f ? m : s) || int'(ref2) != (f ? s : m)) begin
          failures++;
          $display("FAIL: s=%0d flag=%0d ref1=%0d ref2=%0d", s, f, ref1, ref2);
        end
        if (s != 0) begin
          checks++;
          if (int'(ref1) + int'(ref2) != 256) begin
            failures++; $display("FAIL: not symmetric s=%0d", s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
