// pwm_fsm -- state machine that turns one sine sample into one PWM period.
//
// Three states, advanced only on clock edges where the pacing input tick is
// high (tick comes from a frequency trigger; tie it high to step every clock):
//   LOAD     T <= sine1, C <= 0. If sine1 = 0 go to PWM_MIN with pwm = 0,
//            otherwise go to PWM_MAX with pwm = 1.
//   PWM_MAX  if C = 2**WIDTH_G-1 (4095): back to LOAD, pwm = 1.
//            else if C = T: go to PWM_MIN, pwm = 1 (C is not incremented).
//            else stay, C <= C + 1, pwm = 1.
//   PWM_MIN  if C = 4095: back to LOAD, pwm = 0.
//            else stay, C <= C + 1, pwm = 0.
// pwm is a registered output: the value written on a transition is seen from
// the next edge on. In ticks, a sample 0 < T < 4095 gives a period of 4098
// ticks with pwm high for T + 2 of them; T = 0 gives 4097 ticks all low; T = 4095
// gives 4097 ticks all high. Duty cycle therefore grows with the sample value.
//
// Interface: clk, rst_n (synchronous, active low), tick, sine1 (WIDTH_G bits);
// outputs pwm, the state, the period counter C and the latched sample T.
// The states, the transition conditions and the output on each transition are
// the design's; the registered output, the priority of C = 4095 over C = T in
// PWM_MAX and the reset state (LOAD, pwm low) are this implementation's reading.
module pwm_fsm
  import pwm_pkg::*;
#(
  parameter int unsigned WIDTH_G = pwm_pkg::DEF_WIDTH_G
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic [WIDTH_G-1:0] sine1,
  output logic               pwm,
  output pwm_state_e         state,
  output logic [WIDTH_G-1:0] count,
  output logic [WIDTH_G-1:0] t_val
);

  localparam logic [WIDTH_G-1:0] C_MAX = '1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_LOAD;
      count <= '0;
      t_val <= '0;
      pwm   <= 1'b0;
    end else if (tick) begin
      unique case (state)
        ST_LOAD: begin
          t_val <= sine1;
          count <= '0;
          if (sine1 == '0) begin
            state <= ST_PWM_MIN;
            pwm   <= 1'b0;
          end else begin
            state <= ST_PWM_MAX;
            pwm   <= 1'b1;
          end
        end
        ST_PWM_MAX: begin
          pwm <= 1'b1;
          if (count == C_MAX)
            state <= ST_LOAD;
          else if (count == t_val)
            state <= ST_PWM_MIN;
          else
            count <= count + 1'b1;
        end
        ST_PWM_MIN: begin
          pwm <= 1'b0;
          if (count == C_MAX)
            state <= ST_LOAD;
          else
            count <= count + 1'b1;
        end
        default: begin
          state <= ST_LOAD;
          pwm   <= 1'b0;
        end
      endcase
    end
  end

endmodule
