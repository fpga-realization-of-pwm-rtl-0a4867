// freq_trigger -- programmable clock divider producing a one-cycle trigger.
//
// A free-running counter counts clock cycles. When it reaches the selected
// division factor minus one it is cleared and the registered output des_sig is
// high for one clock, so des_sig pulses once every div_fact clock cycles.
// The switch sw0 selects the factor: div_fact_low when 0, div_fact_high when 1.
// A factor of 0 or 1 gives a pulse on every clock. The design uses this block
// twice: inside the sine generator to pace the sample address, and in front of
// the PWM state machine to pace its period counter.
//
// Interface: clk, rst_n (synchronous, active low), sw0, div_fact_low,
// div_fact_high (DIV_W bits each), des_sig (pulse).
// Timing: after reset the first pulse appears div_fact cycles later (counter
// value div_fact-1 seen on a clock edge, pulse registered on that edge).
// The counter reset, the >= comparison and the two-factor switch follow the
// design's description; the counter width DIV_W and the synchronous reset are
// this implementation's choices.
module freq_trigger #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sw0,
  input  logic [DIV_W-1:0] div_fact_low,
  input  logic [DIV_W-1:0] div_fact_high,
  output logic             des_sig
);

  logic [DIV_W-1:0] freq_cnt;
  logic [DIV_W-1:0] div_fact;
  logic             at_end;

  assign div_fact = sw0 ? div_fact_high : div_fact_low;
  // cnt >= div_fact - 1, written without the wrap-around of div_fact = 0.
  assign at_end   = ({1'b0, freq_cnt} + 1'b1) >= {1'b0, div_fact};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      freq_cnt <= '0;
      des_sig  <= 1'b0;
    end else if (at_end) begin
      freq_cnt <= '0;
      des_sig  <= 1'b1;
    end else begin
      freq_cnt <= freq_cnt + 1'b1;
      des_sig  <= 1'b0;
    end
  end

endmodule
