// tb_freq_trigger -- self-checking test of the programmable trigger divider.
//
// For several division factors and both positions of sw0 the test measures the
// number of clocks between consecutive des_sig pulses and checks it equals the
// selected factor (1 for factors 0 and 1), that every pulse lasts exactly one
// clock, and that the first pulse after reset comes div_fact clocks after reset
// is released. A watchdog ends the run with a failure if it hangs.
module tb_freq_trigger;
  localparam int unsigned DIV_W = 8;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             sw0;
  logic [DIV_W-1:0] div_lo, div_hi;
  logic             des_sig;

  int checks = 0;
  int failures = 0;

  freq_trigger #(.DIV_W(DIV_W)) dut (
    .clk(clk), .rst_n(rst_n), .sw0(sw0),
    .div_fact_low(div_lo), .div_fact_high(div_hi), .des_sig(des_sig)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reset, then check the first pulse position and N further intervals.
  task automatic run_case(input logic s, input int unsigned lo, input int unsigned hi,
                          input int n_intervals);
    int unsigned expected;
    int unsigned gap;
    expected = (s ? hi : lo);
    if (expected == 0) expected = 1;
    sw0    = s;
    div_lo = DIV_W'(lo);
    div_hi = DIV_W'(hi);
    rst_n  = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // first pulse: visible after exactly `expected` rising edges
    gap = 0;
    do begin
      @(posedge clk); #1;
      gap++;
    end while (!des_sig && gap < 1000);
    check(gap == expected, $sformatf("first pulse after %0d clocks, expected %0d (sw0=%0b)",
                                     gap, expected, s));
    for (int i = 0; i < n_intervals; i++) begin
      if (expected > 1) begin
        @(posedge clk); #1;
        check(!des_sig, "pulse longer than one clock");
      end
      gap = (expected > 1) ? 1 : 0;
      do begin
        @(posedge clk); #1;
        gap++;
      end while (!des_sig && gap < 1000);
      check(gap == expected, $sformatf("pulse interval %0d, expected %0d (lo=%0d hi=%0d sw0=%0b)",
                                       gap, expected, lo, hi, s));
    end
  endtask

  initial begin
    run_case(1'b0, 5, 3, 6);
    run_case(1'b1, 5, 3, 6);
    run_case(1'b0, 1, 7, 6);
    run_case(1'b0, 0, 7, 6);
    run_case(1'b1, 9, 2, 6);
    run_case(1'b0, 255, 2, 3);
    for (int r = 0; r < 10; r++)
      run_case(1'($urandom_range(1)), $urandom_range(1, 40), $urandom_range(1, 40), 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
