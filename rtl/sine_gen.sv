// sine_gen -- digital sine generator.
//
// A frequency trigger (freq_trigger) divides the clock; each of its pulses
// advances an address counter that walks through one period of the sine
// table (sine_rom), wrapping after 2**DEPTH_G samples. The sample read from the
// table is scaled by the amplitude input and registered as sine1:
//   sine1 = (table[addr] * (amp + 1)) >> AMP_W
// so amp = all ones returns the table unchanged (full scale) and smaller values
// shrink the whole unsigned wave toward zero. The sine frequency is
//   f_clk / (div_fact * 2**DEPTH_G)
// with div_fact chosen by sw0 between div_fact_low and div_fact_high.
//
// Interface: clk, rst_n (synchronous, active low), sw0, div_fact_low,
// div_fact_high, amp (AMP_W bits); outputs sine1 (WIDTH_G bits) and addr, the
// index of the sample being presented.
// Timing: a trigger pulse increments addr on the same clock edge that sees it;
// sine1 follows a change of addr two clocks later (table read, then scaling).
// After reset addr = 0 and sine1 = 0 until the pipeline fills.
// Counter, table and amplitude input follow the design; the amplitude scaling
// rule and the two-stage registering are this implementation's choices.
module sine_gen
  import pwm_pkg::*;
#(
  parameter int unsigned DEPTH_G = pwm_pkg::DEF_DEPTH_G,
  parameter int unsigned WIDTH_G = pwm_pkg::DEF_WIDTH_G,
  parameter int unsigned AMP_W   = pwm_pkg::DEF_AMP_W,
  parameter int unsigned DIV_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sw0,
  input  logic [DIV_W-1:0]   div_fact_low,
  input  logic [DIV_W-1:0]   div_fact_high,
  input  logic [AMP_W-1:0]   amp,
  output logic [WIDTH_G-1:0] sine1,
  output logic [DEPTH_G-1:0] addr
);

  logic                       trig;
  logic [WIDTH_G-1:0]         rom_data;
  logic [AMP_W:0]             amp_p1;
  logic [WIDTH_G+AMP_W:0]     product;

  freq_trigger #(.DIV_W(DIV_W)) u_trig (
    .clk           (clk),
    .rst_n         (rst_n),
    .sw0           (sw0),
    .div_fact_low  (div_fact_low),
    .div_fact_high (div_fact_high),
    .des_sig       (trig)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)
      addr <= '0;
    else if (trig)
      addr <= addr + 1'b1;
  end

  sine_rom #(.DEPTH_G(DEPTH_G), .WIDTH_G(WIDTH_G)) u_rom (
    .clk  (clk),
    .addr (addr),
    .data (rom_data)
  );

  assign amp_p1  = {1'b0, amp} + 1'b1;
  assign product = (WIDTH_G+AMP_W+1)'(rom_data) * (WIDTH_G+AMP_W+1)'(amp_p1);

  always_ff @(posedge clk) begin
    if (!rst_n)
      sine1 <= '0;
    else
      sine1 <= product[AMP_W +: WIDTH_G];
  end

endmodule
