// pwm_pkg -- types and constants shared by the sine-modulated PWM design.
//
// Holds the default table geometry (256 samples of 12 bits, as the design
// specifies), the state type of the PWM state machine and the constant function
// that computes one entry of the sine table at elaboration time.
//
// Sine table formula (one full period, unsigned, DEPTH = 2**depth_g entries):
//   table[k] = round( (2**(width_g-1) - 1) * (1 + sin(2*pi*k/DEPTH)) )
// For width_g = 12 this spans 0 .. 4094 with the midpoint at 2047; these are the
// values the reference simulation shows (e.g. 1846, 1796, 1747 ... 672 on the
// falling half of the wave). The table is evaluated only at elaboration, so no
// real arithmetic reaches the synthesized logic.
package pwm_pkg;

  // Address bits of the sine table: 2**8 = 256 samples per period.
  localparam int unsigned DEF_DEPTH_G = 8;
  // Bits per sample and width of the PWM period counter (0 .. 4095).
  localparam int unsigned DEF_WIDTH_G = 12;
  // Bits of the amplitude input; all ones gives the full-scale table.
  localparam int unsigned DEF_AMP_W   = 8;

  // States of the PWM state machine.
  typedef enum logic [1:0] {
    ST_LOAD    = 2'd0,   // latch the sample into T, clear the count
    ST_PWM_MAX = 2'd1,   // output high, count up to T
    ST_PWM_MIN = 2'd2    // output low, count up to the end of the period
  } pwm_state_e;

  localparam real PI = 3.14159265358979323846;

  // One sample of the sine table, see the formula above.
  function automatic int unsigned sine_sample(int unsigned k, int unsigned depth_bits,
                                              int unsigned width_bits);
    real half;
    real x;
    half = real'((1 << (width_bits - 1)) - 1);
    x = half * (1.0 + $sin(2.0 * PI * real'(k) / real'(1 << depth_bits)));
    return $rtoi(x + 0.5);
  endfunction

endpackage
