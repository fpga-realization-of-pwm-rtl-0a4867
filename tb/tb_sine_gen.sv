// tb_sine_gen -- self-checking test of the digital sine generator.
//
// Uses small division factors so that several full sine periods run quickly.
// On every clock it checks sine1 against a reference pipeline built here:
// the address advances once per div_fact clocks, and sine1 equals
//   (round(2047*(1+sin(2*pi*k/256))) * (amp+1)) >> 8
// for the address k seen one clock edge earlier and the amplitude at the current edge. It also checks the address step
// interval for both sw0 settings, the address wrap from 255 to 0, and several
// amplitudes including 0. A watchdog ends a hung run.
module tb_sine_gen;
  localparam int unsigned DIV_LO = 3;
  localparam int unsigned DIV_HI = 2;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        sw0;
  logic [7:0]  amp;
  logic [11:0] sine1;
  logic [7:0]  addr;

  int checks = 0;
  int failures = 0;
  int wraps = 0;

  sine_gen #(.DEPTH_G(8), .WIDTH_G(12), .AMP_W(8), .DIV_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .sw0(sw0),
    .div_fact_low(8'(DIV_LO)), .div_fact_high(8'(DIV_HI)),
    .amp(amp), .sine1(sine1), .addr(addr)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int table_val(int k);
    real v;
    v = 2047.0 * (1.0 + $sin(2.0 * 3.14159265358979 * k / 256.0));
    return int'($floor(v + 0.5));
  endfunction

  function automatic int scaled(int k, int a);
    return (table_val(k) * (a + 1)) >> 8;
  endfunction

  // Reference: the address seen at the previous clock edge (the table reads it)
  // and the amplitude seen at this edge (the scaling stage uses it).
  int addr_prev;
  int last_addr;
  int since_step;
  bit first_step;
  bit running = 1'b0;

  always @(posedge clk) begin
    int a_pre, amp_pre;
    a_pre   = int'(addr);
    amp_pre = int'(amp);
    if (running) begin
      #1;
      check(int'(sine1) == scaled(addr_prev, amp_pre),
            $sformatf("sine1=%0d expected %0d (addr %0d amp %0d)", sine1, scaled(addr_prev, amp_pre),
                      addr_prev, amp_pre));
      since_step++;
      if (int'(addr) != last_addr) begin
        check(int'(addr) == ((last_addr + 1) % 256), $sformatf("address jumped %0d -> %0d", last_addr, addr));
        if (last_addr == 255) wraps++;
        // after reset the divider needs one extra clock to register its first pulse
        check(since_step == int'(sw0 ? DIV_HI : DIV_LO) + (first_step ? 1 : 0),
              $sformatf("address step after %0d clocks, sw0=%0b", since_step, sw0));
        first_step = 1'b0;
        since_step = 0;
        last_addr = int'(addr);
      end
      addr_prev = a_pre;
    end
  end

  initial begin
    sw0 = 1'b0;
    amp = 8'hFF;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    addr_prev = 0; last_addr = 0; since_step = 0; first_step = 1'b1;
    // the table output already holds entry 0, read during reset
    running = 1'b1;
    repeat (256 * DIV_LO + 10) @(negedge clk);
    amp = 8'd100;
    repeat (300) @(negedge clk);
    amp = 8'd0;
    repeat (100) @(negedge clk);
    amp = 8'hFF;
    // switch frequency right after an address step so the interval check stays exact
    @(posedge clk); #2;
    while (since_step != 0) begin @(posedge clk); #2; end
    sw0 = 1'b1;
    repeat (256 * DIV_HI + 50) @(negedge clk);
    running = 1'b0;
    check(wraps >= 2, $sformatf("address wrapped %0d times", wraps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
