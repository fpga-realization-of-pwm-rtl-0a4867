// pwm_top -- sine-modulated PWM generator.
//
// The modulator produces a pulse train whose duty cycle follows a sine wave.
// Three parts, wired as in the design's block diagram:
//   * sine_gen      -- the digital sine generator: a divided clock walks a
//                      256-entry, 12-bit sine table; the sample is scaled by amp
//                      and presented as sine_out.
//   * freq_trigger  -- a second, faster divider that paces the PWM state machine
//                      (one pulse per step of its 12-bit period counter).
//   * pwm_fsm       -- latches a sample at the start of each period and keeps
//                      pwm high for about sample/4096 of the period.
// One switch, sw0, selects the low (0) or high (1) division factor of both
// dividers. With the defaults (sine divider 8196/4098, PWM divider 2/1) one PWM
// period of 4098 steps lasts exactly one sine sample in both settings, so
// each sample gets one pulse; sw0 = 1 doubles both the sine frequency and the
// PWM frequency. At a 100 MHz clock that is about 47.7 Hz / 95.3 Hz for the sine
// and 12.2 kHz / 24.4 kHz for the PWM. The division factors are parameters of
// this implementation; the design does not state its values.
//
// Interface: clk, rst_n (synchronous, active low), sw0, amp (AMP_W bits, all
// ones for full scale); outputs pwm, sine_out (the sample feeding the state
// machine) and the state machine's state for observation. The sine address and
// the state machine's counter and latched sample are internal and left
// unconnected here.
module pwm_top
  import pwm_pkg::*;
#(
  parameter int unsigned DEPTH_G       = pwm_pkg::DEF_DEPTH_G,
  parameter int unsigned WIDTH_G       = pwm_pkg::DEF_WIDTH_G,
  parameter int unsigned AMP_W         = pwm_pkg::DEF_AMP_W,
  parameter int unsigned DIV_W         = 16,
  parameter int unsigned SINE_DIV_LOW  = 8196,
  parameter int unsigned SINE_DIV_HIGH = 4098,
  parameter int unsigned PWM_DIV_LOW   = 2,
  parameter int unsigned PWM_DIV_HIGH  = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sw0,
  input  logic [AMP_W-1:0]   amp,
  output logic               pwm,
  output logic [WIDTH_G-1:0] sine_out,
  output pwm_state_e         fsm_state
);

  logic                pwm_tick;

  sine_gen #(
    .DEPTH_G (DEPTH_G),
    .WIDTH_G (WIDTH_G),
    .AMP_W   (AMP_W),
    .DIV_W   (DIV_W)
  ) u_sine (
    .clk           (clk),
    .rst_n         (rst_n),
    .sw0           (sw0),
    .div_fact_low  (DIV_W'(SINE_DIV_LOW)),
    .div_fact_high (DIV_W'(SINE_DIV_HIGH)),
    .amp           (amp),
    .sine1         (sine_out),
    .addr          ()
  );

  freq_trigger #(.DIV_W(DIV_W)) u_pwm_trig (
    .clk           (clk),
    .rst_n         (rst_n),
    .sw0           (sw0),
    .div_fact_low  (DIV_W'(PWM_DIV_LOW)),
    .div_fact_high (DIV_W'(PWM_DIV_HIGH)),
    .des_sig       (pwm_tick)
  );

  pwm_fsm #(.WIDTH_G(WIDTH_G)) u_fsm (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (pwm_tick),
    .sine1 (sine_out),
    .pwm   (pwm),
    .state (fsm_state),
    .count (),
    .t_val ()
  );

endmodule
