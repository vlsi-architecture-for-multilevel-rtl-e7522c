// tb_tchb_pwm_top: end-to-end test of the modulator at its default
// parameters (50 MHz clock, 20 kHz switching, 50 Hz fundamental).
//
// The testbench holds its own cycle-exact model of the whole datapath:
//   * sample ticks: the k-th clock after reset ends the FSM's second phase
//     when k is even, and the tick count after clock k is
//     floor(51 * floor(k / 2) / 125); the address counters move one clock
//     later;
//   * after n ticks the carrier is triangle(n mod 510) and the reference
//     sine sample j = (n div 510) mod 400 is 128 +/- round(127 sin(pi j/200));
//   * the index is round(M * 256) and the scaled sine
//     clamp(floor(128 + (ref - 128) * index / 256 + 0.5), 0, 255);
//   * Ta+ = ya1 >= carrier, Tb+ = ya2 >= carrier, the five-level command is
//     the number of stacked carriers 64k + carrier/4 that ya1 is at or above,
//     minus 2.
// The full-bridge gates and the level are compared 3 clocks after the
// address state they come from, the TCHB gates 4 clocks after. The TCHB
// gates also drive a behavioural bridge model whose output voltage must be
// level * 162.5 V with no short or floating leg.
//
// The run covers one full fundamental period at M = 1.0, then 0.85 and the
// over-modulating 1.25 for part of a period each. Mechanisms counted, each
// of which must occur: all five output levels, both half-period flag edges,
// clipping of the scaled sine at M = 1.25, a modulation index change, and
// the fundamental period itself (flag edges exactly 500000 clocks apart).
module tb_tchb_pwm_top;
  import pwm_pkg::*;

  logic clk = 0, rst = 1;
  logic [31:0] m_float;
  fb_gates_t   fb_gates;
  tchb_gates_t tchb_gates;
  level_t      level;
  logic        flag;
  int          v_out_mv;
  logic        bridge_fault;

  int checks = 0, failures = 0;
  int level_seen [5];
  int flag_rises = 0, flag_falls = 0, clips = 0, index_changes = 0, period_ok = 0;
  longint unsigned k = 0;          // clocks since reset release
  longint unsigned last_flag_edge = 0;
  int index_now = 256;             // model index in force
  int settle = 0;                  // clocks to skip after an index change
  logic flag_prev = 0;

  tchb_pwm_top dut (.clk, .rst, .m_float, .fb_gates, .tchb_gates, .level, .flag);
  tchb_bridge_model bridge (.gates(tchb_gates), .v_out_mv, .fault(bridge_fault));

  always #10 clk = ~clk;           // 50 MHz

  initial begin
    #200_000_000;                  // 200 ms of simulated time
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  function automatic longint unsigned ticks_after(longint signed clocks);
    if (clocks <= 0) return 0;
    return unsigned'((51 * (clocks / 2)) / 125);
  endfunction

  // address state in force after clock e: ticks raised by clock e-1
  function automatic longint unsigned addr_state(longint signed e);
    return ticks_after(e - 1);
  endfunction

  function automatic int tri_at(longint unsigned n);
    int c;
    c = int'(n % 510);
    return (c <= 255) ? c : 510 - c;
  endfunction

  function automatic int ref1_at(longint unsigned n);
    int j, s;
    j = int'((n / 510) % 400);
    s = 128 + int'($floor(127.0 * $sin(3.141592653589793 * real'(j % 200) / 200.0) + 0.5));
    return (j < 200) ? s : 256 - s;
  endfunction

  function automatic int scale(int r, int ix);
    int v;
    v = int'($floor(128.0 + real'(r - 128) * real'(ix) / 256.0 + 0.5));
    return (v < 0) ? 0 : ((v > 255) ? 255 : v);
  endfunction

  function automatic int pd_level(int ya, int c);
    int cnt = 0;
    for (int kk = 0; kk < 4; kk++) if (ya >= 64 * kk + c / 4) cnt++;
    return cnt - 2;
  endfunction

  // Single-precision encodings of the indices used (exact binary fractions
  // except 0.85, whose nearest single is 0.85000002384; x 256 = 217.6).
  localparam logic [31:0] M_1_00 = 32'h3F80_0000;
  localparam logic [31:0] M_0_85 = 32'h3F59_999A;
  localparam logic [31:0] M_1_25 = 32'h3FA0_0000;

  // ---------------------------------------------------------------- checks
  always @(posedge clk) begin
    if (!rst) begin
      #1;
      k++;
      if (settle > 0) settle--;
      else if (k > 6) begin
        longint unsigned n3, n4;
        int c, y1, y2, lv3, lv4, r1;
        n3 = addr_state(longint'(k) - 3);
        n4 = addr_state(longint'(k) - 4);
        c  = tri_at(n3);
        r1 = ref1_at(n3);
        y1 = scale(r1, index_now);
        y2 = scale(256 - r1, index_now);
        lv3 = pd_level(y1, c);
        lv4 = pd_level(scale(ref1_at(n4), index_now), tri_at(n4));
        checks++;
        if (fb_gates.ta_p != (y1 >= c) || fb_gates.ta_m != (y1 < c) ||
            fb_gates.tb_p != (y2 >= c) || fb_gates.tb_m != (y2 < c) ||
            int'(level) != lv3) begin
          failures++;
          if (failures < 10)
            $display("FAIL: clk %0d n=%0d fb=%b level=%0d expected ya1=%0d ya2=%0d c=%0d level=%0d",
                     k, n3, fb_gates, level, y1, y2, c, lv3);
        end
        checks++;
        if (bridge_fault || v_out_mv != lv4 * 162500) begin
          failures++;
          if (failures < 10)
            $display("FAIL: clk %0d bridge v=%0d mV fault=%0d expected level %0d",
                     k, v_out_mv, bridge_fault, lv4);
        end
        level_seen[lv3 + 2]++;
        if (index_now > 256 && (y1 == 255 || y1 == 0) && r1 != y1) clips++;
      end
      if (flag != flag_prev) begin
        if (flag) flag_rises++; else flag_falls++;
        if (last_flag_edge != 0) begin
          checks++;
          if (k - last_flag_edge != 500000) begin
            failures++;
            $display("FAIL: half period %0d clocks", k - last_flag_edge);
          end else period_ok++;
        end
        last_flag_edge = k;
      end
      flag_prev = flag;
    end
  end

  task automatic set_index(input logic [31:0] bits, input int ix);
    @(negedge clk);
    m_float   = bits;
    index_now = ix;
    settle    = 6;
    index_changes++;
  endtask

  initial begin
    for (int i = 0; i < 5; i++) level_seen[i] = 0;
    m_float = M_1_00;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    // one full fundamental period plus margin at M = 1.0
    repeat (1_010_000) @(posedge clk);
    set_index(M_0_85, 218);
    repeat (300_000) @(posedge clk);
    set_index(M_1_25, 320);
    repeat (600_000) @(posedge clk);

    for (int i = 0; i < 5; i++) begin
      checks++;
      if (level_seen[i] == 0) begin failures++; $display("FAIL: level %0d never produced", i - 2); end
    end
    checks++;
    if (flag_rises == 0 || flag_falls == 0) begin failures++; $display("FAIL: no flag edges"); end
    checks++;
    if (clips == 0) begin failures++; $display("FAIL: no over-modulation clipping"); end
    checks++;
    if (index_changes < 2) begin failures++; $display("FAIL: index changes"); end
    checks++;
    if (period_ok == 0) begin failures++; $display("FAIL: half period never measured"); end
    $display("levels -2..+2 seen: %0d %0d %0d %0d %0d; flag rises %0d falls %0d; clipped samples %0d; index changes %0d; half periods timed %0d",
             level_seen[0], level_seen[1], level_seen[2], level_seen[3], level_seen[4],
             flag_rises, flag_falls, clips, index_changes, period_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
