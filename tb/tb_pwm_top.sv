// tb_pwm_top -- end-to-end test of the sine-modulated PWM generator.
//
// Runs the top with its default parameters (256 x 12-bit table, sine divider
// 8196/4098, PWM divider 2/1) through a full sine period in each sw0 setting and
// at two amplitudes, watching only the top's ports:
//   * sine_out must walk the table one entry at a time, each value equal to
//     (round(2047*(1+sin(2*pi*k/256))) * (amp+1)) >> 8, with a new entry every
//     8196 clocks (sw0 = 0) or 4098 clocks (sw0 = 1);
//   * each PWM period (from one exit of LOAD to the next) must last
//     div * 4098 clocks (div * 4097 for samples 0 and 4095) and be high for
//     div * (sample + 2) clocks (0 for sample 0), where sample is the value of
//     sine_out when the machine left LOAD and div is the PWM divider;
//   * consecutive periods must carry consecutive table entries, i.e. one pulse
//     per sine sample. Periods of sample 0 are one step shorter, so the PWM
//     period drifts against the sample clock; a step of 0 or 2 entries is
//     accepted, but at least 90% of the steps must be exactly one.
// It counts each mechanism: periods entered through PWM_max and through PWM_min
// (sample 0), period checks in each sw0 setting, switches of sw0 in both
// directions and amplitude changes, and fails if one never happened.
// A watchdog ends a hung run.
module tb_pwm_top;
  import pwm_pkg::*;

  localparam int SINE_DIV [2] = '{8196, 4098};
  localparam int PWM_DIV  [2] = '{2, 1};

  logic        clk = 1'b0;
  logic        rst_n;
  logic        sw0;
  logic [7:0]  amp;
  logic        pwm;
  logic [11:0] sine_out;
  pwm_state_e  fsm_state;

  int checks = 0;
  int failures = 0;

  pwm_top dut (
    .clk(clk), .rst_n(rst_n), .sw0(sw0), .amp(amp),
    .pwm(pwm), .sine_out(sine_out), .fsm_state(fsm_state)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  function automatic int table_val(int k);
    real v;
    v = 2047.0 * (1.0 + $sin(2.0 * 3.14159265358979 * (k % 256) / 256.0));
    return int'($floor(v + 0.5));
  endfunction

  function automatic int scaled(int k, int a);
    return (table_val(k) * (a + 1)) >> 8;
  endfunction

  function automatic int exp_high(int v);
    if (v == 0) return 0;
    if (v == 4095) return 4097;
    return v + 2;
  endfunction

  function automatic int exp_len(int v);
    return (v == 0 || v == 4095) ? 4097 : 4098;
  endfunction

  // Entries from..to-1 all scale to the same value, so sine_out cannot show
  // where inside that run the address was.
  function automatic bit plateau(int from, int to, int a);
    for (int i = from + 1; i < to; i++)
      if (scaled(i, a) != scaled(from, a)) return 1'b0;
    return 1'b1;
  endfunction

  bit running = 1'b0;

  // --- sine sample tracking ---
  int k = 0;                 // table index currently on sine_out (not wrapped)
  int prev_sine = 0;
  int since_change = 0;
  bit clean_interval = 1'b0; // last change was a single table step with no disturbance
  bit disturbed = 1'b0;      // sw0 or amp changed since the last change
  int sine_interval_checks [2] = '{0, 0};

  // --- PWM period tracking ---
  bit in_period = 1'b0;
  int period_sample = 0;
  int period_k = 0;
  int period_sw0 = 0;
  bit period_disturbed = 1'b0;
  int period_clks = 0;
  int high_clks = 0;
  int periods_max = 0, periods_min = 0;
  int period_checks [2] = '{0, 0};
  int consecutive_ok = 0;
  int consecutive_checks = 0;

  int sw0_rise = 0, sw0_fall = 0, amp_changes = 0, amp_rescale = 0;
  logic sw0_last;
  logic [7:0] amp_last;

  always @(posedge clk) begin
    logic pwm_pre;
    pwm_state_e st_pre;
    int sine_pre, amp_pre, s_pre;
    int j;
    bit found;
    pwm_pre  = pwm;
    st_pre   = fsm_state;
    sine_pre = int'(sine_out);
    amp_pre  = int'(amp);
    s_pre    = int'(sw0);
    if (running) begin
      #1;
      // sine_out follows the table
      since_change++;
      if (int'(sine_out) != prev_sine) begin
        found = 1'b0;
        for (j = 0; j <= 3 && !found; j++) begin
          if (scaled(k + j, amp_pre) == int'(sine_out)) begin
            found = 1'b1;
            break;
          end
        end
        check(found, $sformatf("sine_out %0d is not the next table entry after index %0d", sine_out, k % 256));
        if (found) begin
          if (j == 0) amp_rescale++;
          if (j == 1 && clean_interval && !disturbed) begin
            check(since_change == SINE_DIV[s_pre],
                  $sformatf("sample lasted %0d clocks, expected %0d", since_change, SINE_DIV[s_pre]));
            sine_interval_checks[s_pre]++;
          end
          clean_interval = (j == 1);
          k += j;
        end
        disturbed = 1'b0;
        since_change = 0;
        prev_sine = int'(sine_out);
      end

      // PWM periods: a period runs from one exit of LOAD to the next
      if (in_period) begin
        period_clks++;
        high_clks += int'(pwm_pre);
      end
      if (st_pre == ST_LOAD && fsm_state != ST_LOAD) begin
        if (in_period && !period_disturbed) begin
          check(period_clks == PWM_DIV[period_sw0] * exp_len(period_sample),
                $sformatf("period of sample %0d lasted %0d clocks", period_sample, period_clks));
          check(high_clks == PWM_DIV[period_sw0] * exp_high(period_sample),
                $sformatf("sample %0d: pwm high %0d clocks, expected %0d", period_sample, high_clks,
                          PWM_DIV[period_sw0] * exp_high(period_sample)));
          period_checks[period_sw0]++;
          // about one period per sample: the next period carries the next table
          // entry, or (when the period has drifted across a sample boundary, or
          // neighbouring entries scale to the same value) the same, the one after, or
          // the first entry past a run of equal values
          check(k >= period_k && (k <= period_k + 2 || plateau(period_k, k, int'(amp_last))),
                $sformatf("period carried table index %0d after %0d", k % 256, period_k % 256));
          if (k == period_k + 1) consecutive_ok++;
          consecutive_checks++;
        end
        check(pwm == (sine_pre != 0), "pwm level after LOAD does not match the sample");
        if (sine_pre == 0) periods_min++; else periods_max++;
        in_period = 1'b1;
        period_sample = sine_pre;
        period_k = k;
        period_sw0 = s_pre;
        period_disturbed = 1'b0;
        period_clks = 0;
        high_clks = 0;
      end
    end
  end

  task automatic set_mode(input logic s, input logic [7:0] a);
    @(negedge clk);
    if (s != sw0_last) begin
      if (s) sw0_rise++; else sw0_fall++;
    end
    if (a != amp_last) amp_changes++;
    if (s != sw0_last || a != amp_last) begin
      disturbed = 1'b1;
      period_disturbed = 1'b1;
    end
    sw0 = s;
    amp = a;
    sw0_last = s;
    amp_last = a;
  endtask

  initial begin
    sw0 = 1'b0; amp = 8'hFF; sw0_last = 1'b0; amp_last = 8'hFF;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    running = 1'b1;
    // one full sine period at the low rate, full amplitude
    repeat (257 * 8196) @(posedge clk);
    // one full period at the high rate
    set_mode(1'b1, 8'hFF);
    repeat (257 * 4098) @(posedge clk);
    // half amplitude, high rate
    set_mode(1'b1, 8'd127);
    repeat (257 * 4098) @(posedge clk);
    // back to the low rate
    set_mode(1'b0, 8'd127);
    repeat (40 * 8196) @(posedge clk);
    running = 1'b0;

    check(periods_max > 0, "no period entered PWM_max");
    check(periods_min > 0, "no period entered PWM_min directly (sample 0)");
    check(period_checks[0] > 0 && period_checks[1] > 0, "periods not checked in both sw0 settings");
    check(sine_interval_checks[0] > 0 && sine_interval_checks[1] > 0, "sample rate not checked in both sw0 settings");
    check(consecutive_ok * 10 >= consecutive_checks * 9,
          $sformatf("only %0d of %0d periods carried the next sample", consecutive_ok, consecutive_checks));
    check(sw0_rise > 0 && sw0_fall > 0, "sw0 not switched both ways");
    check(amp_changes > 0 && amp_rescale > 0, "amplitude change not seen on sine_out");
    $display("periods: via PWM_max %0d, via PWM_min %0d; checked sw0=0 %0d, sw0=1 %0d; consecutive %0d",
             periods_max, periods_min, period_checks[0], period_checks[1], consecutive_ok);
    $display("sample intervals checked: sw0=0 %0d, sw0=1 %0d; sw0 rises %0d falls %0d; amplitude changes %0d",
             sine_interval_checks[0], sine_interval_checks[1], sw0_rise, sw0_fall, amp_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
