// sine_rom -- one period of an unsigned sine wave in a synchronous ROM.
//
// 2**DEPTH_G entries of WIDTH_G bits. The contents are computed at elaboration
// by pwm_pkg::sine_sample (formula in pwm_pkg), so changing the parameters
// regenerates the table; nothing is read from a file. The read is registered:
// data shows the entry at addr one clock after addr is applied, which maps onto
// FPGA block RAM or distributed ROM.
//
// The table size (256 samples of 12 bits) is the design's; the exact scaling
// (midpoint 2**(WIDTH_G-1)-1, rounding to nearest) is the one that reproduces
// the sample values of the reference simulation.
module sine_rom
  import pwm_pkg::*;
#(
  parameter int unsigned DEPTH_G = pwm_pkg::DEF_DEPTH_G,
  parameter int unsigned WIDTH_G = pwm_pkg::DEF_WIDTH_G
) (
  input  logic               clk,
  input  logic [DEPTH_G-1:0] addr,
  output logic [WIDTH_G-1:0] data
);

  localparam int unsigned N = 1 << DEPTH_G;
  typedef logic [WIDTH_G-1:0] table_t [N];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned k = 0; k < N; k++)
      t[k] = WIDTH_G'(sine_sample(k, DEPTH_G, WIDTH_G));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk)
    data <= TABLE[addr];

endmodule
