// tb_pwm_fsm -- self-checking test of the PWM state machine.
//
// The pacing input tick is random (high about two clocks in three), and sine1
// carries a new random value on every clock except the one where the machine
// loads, where it carries the sample chosen for the next period. Per period the
// test works out from that sample alone:
//   period length in ticks: 4098, or 4097 for samples 0 and 4095
//   ticks with pwm high:    sample + 2, or 0 for sample 0, or 4097 for 4095
// counting the ticks from just after one load to the next load inclusive. It
// checks that the machine is in LOAD exactly at the predicted ticks, that the
// high count matches, and that nothing moves on clocks without a tick. The
// samples cover 0, 1, 2, 4093, 4094, 4095, mid-scale and random values, so
// every transition of the state diagram is taken. A watchdog ends a hung run.
module tb_pwm_fsm;
  import pwm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        tick;
  logic [11:0] sine1;
  logic        pwm;
  pwm_state_e  state;
  logic [11:0] count, t_val;

  int checks = 0;
  int failures = 0;

  pwm_fsm #(.WIDTH_G(12)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .sine1(sine1),
    .pwm(pwm), .state(state), .count(count), .t_val(t_val)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int NSAMP = 16;
  int samples [NSAMP] = '{2047, 0, 1, 2, 4095, 4094, 4093, 3000, 0, 0, 4095, 4095, 100, -1, -1, -1};

  function automatic int exp_high(int v);
    if (v == 0) return 0;
    if (v == 4095) return 4097;
    return v + 2;
  endfunction

  function automatic int exp_len(int v);
    return (v == 0 || v == 4095) ? 4097 : 4098;
  endfunction

  int frame = 0;          // index of the sample to present at the next load
  int ticks_to_load = 0;  // ticks until the next predicted load
  int high_cnt = 0;
  int expect_high = 0;
  int cur_sample = 0;
  int cnt_min_entries = 0, cnt_max_entries = 0, cnt_max_to_min = 0, cnt_max_to_load = 0;
  pwm_state_e prev_state;
  bit done = 1'b0;

  // Stimulus for the next clock edge, set on the falling edge.
  always @(negedge clk) begin
    if (rst_n && !done) begin
      tick = ($urandom_range(2) != 0);
      if (ticks_to_load == 0 && tick)
        sine1 = 12'(samples[frame]);
      else
        sine1 = 12'($urandom);
    end
  end

  always @(posedge clk) begin
    logic pwm_pre, tick_pre;
    pwm_state_e st_pre;
    int cnt_pre;
    pwm_pre  = pwm;
    tick_pre = tick;
    st_pre   = state;
    cnt_pre  = int'(count);
    if (rst_n && !done) begin
      #1;
      if (!tick_pre) begin
        check(state == st_pre && pwm == pwm_pre && int'(count) == cnt_pre, "changed without a tick");
      end else begin
        high_cnt += int'(pwm_pre);
        if (ticks_to_load == 0) begin
          check(st_pre == ST_LOAD, $sformatf("frame %0d: expected LOAD, state %s", frame, st_pre.name()));
          if (frame > 0)
            check(high_cnt == expect_high, $sformatf("frame %0d sample %0d: %0d high ticks, expected %0d",
                                                     frame - 1, cur_sample, high_cnt, expect_high));
          if (frame == NSAMP) begin
            done = 1'b1;
          end else begin
            cur_sample    = samples[frame];
            expect_high   = exp_high(cur_sample);
            ticks_to_load = exp_len(cur_sample) - 1;
            high_cnt      = 0;
            check(int'(t_val) == cur_sample, "T does not hold the loaded sample");
            if (cur_sample == 0) cnt_min_entries++; else cnt_max_entries++;
            frame++;
          end
        end else begin
          check(st_pre != ST_LOAD, $sformatf("frame %0d: LOAD %0d ticks early", frame, ticks_to_load));
          if (st_pre == ST_PWM_MAX && state == ST_PWM_MIN) cnt_max_to_min++;
          if (st_pre == ST_PWM_MAX && state == ST_LOAD) cnt_max_to_load++;
          ticks_to_load--;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NSAMP; i++)
      if (samples[i] < 0) samples[i] = int'($urandom_range(4095));
    tick  = 1'b0;
    sine1 = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(state == ST_LOAD && pwm == 1'b0 && count == '0, "reset state");
    rst_n = 1'b1;
    wait (done);
    check(cnt_min_entries > 0, "LOAD -> PWM_min never taken");
    check(cnt_max_entries > 0, "LOAD -> PWM_max never taken");
    check(cnt_max_to_min > 0, "PWM_max -> PWM_min never taken");
    check(cnt_max_to_load > 0, "PWM_max -> LOAD never taken");
    $display("transitions: LOAD->MIN %0d, LOAD->MAX %0d, MAX->MIN %0d, MAX->LOAD %0d",
             cnt_min_entries, cnt_max_entries, cnt_max_to_min, cnt_max_to_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
