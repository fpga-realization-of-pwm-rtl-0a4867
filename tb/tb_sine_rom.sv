// tb_sine_rom -- self-checking test of the sine table.
//
// Reads every entry and compares it with round(2047 * (1 + sin(2*pi*k/256)))
// worked out here, checks a run of reference values (entries 132 .. 158,
// the falling part of the wave) written out as constants, the range of the
// table and the one-clock read latency. A watchdog ends a hung run.
module tb_sine_rom;
  logic        clk = 1'b0;
  logic [7:0]  addr;
  logic [11:0] data;

  int checks = 0;
  int failures = 0;

  // Reference samples for addresses 132 .. 158.
  localparam int REF [27] = '{1846, 1796, 1747, 1697, 1648, 1598, 1550, 1501, 1453,
                              1405, 1357, 1310, 1264, 1217, 1172, 1127, 1082, 1038,
                              995, 952, 910, 868, 828, 788, 748, 710, 672};

  sine_rom #(.DEPTH_G(8), .WIDTH_G(12)) dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int expected(int k);
    real v;
    v = 2047.0 * (1.0 + $sin(2.0 * 3.14159265358979 * k / 256.0));
    return int'($floor(v + 0.5));
  endfunction

  initial begin
    int mn, mx;
    mn = 99999; mx = -1;
    for (int k = 0; k < 256; k++) begin
      addr = 8'(k);
      @(posedge clk); #1;
      check(int'(data) == expected(k), $sformatf("entry %0d = %0d, expected %0d", k, data, expected(k)));
      if (int'(data) < mn) mn = int'(data);
      if (int'(data) > mx) mx = int'(data);
    end
    for (int k = 0; k < 27; k++) begin
      addr = 8'(132 + k);
      @(posedge clk); #1;
      check(int'(data) == REF[k], $sformatf("entry %0d = %0d, reference %0d", 132 + k, data, REF[k]));
    end
    check(mn == 0 && mx == 4094, $sformatf("range %0d..%0d, expected 0..4094", mn, mx));
    // latency: data changes only on the clock edge after addr changes
    addr = 8'd64;
    @(posedge clk); #1;
    addr = 8'd192;
    #2;
    check(data == 12'd4094, "data changed before the clock edge");
    @(posedge clk); #1;
    check(data == 12'd0, "entry 192 should be 0 one clock after addressing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
