// tb_ds_modulator: checks the 10-bit second-order one-bit modulator.
//  - DC accuracy: for inputs across 5 %..95 % of full scale the density of
//    ones over 4096 clocks matches x/1024 within 4 counts.
//  - Second-order noise shaping: with Y = z^-2 X + (1 - z^-1)^2 E, the
//    doubly accumulated difference sum(sum(y*1024 - x)) stays bounded; for
//    a first-order loop it would grow without bound.
//  - A ramp of the input (like a slow 10-bit counter) is followed.
//  - Input 0 gives a silent stream after the loop empties, and the
//    modulator recovers from it; with en low the output never changes.
`timescale 1ns/1ps
module tb_ds_modulator;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, y;
  logic [9:0] x = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ds_modulator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dc_test(input int xv);
    int ones;
    longint s1, s2, s2max;
    x = 10'(xv);
    repeat (200) @(negedge clk);     // let the loop settle
    ones = 0; s1 = 0; s2 = 0; s2max = 0;
    repeat (4096) begin
      @(negedge clk);
      ones += int'(y);
      s1 += longint'(y) * 1024 - xv;
      s2 += s1;
      if (s2 > s2max) s2max = s2;
      if (-s2 > s2max) s2max = -s2;
    end
    check(ones >= (xv * 4) - 4 && ones <= (xv * 4) + 4,
          $sformatf("density for x=%0d: %0d ones in 4096", xv, ones));
    // s2 equals a shifted quantisation error plus start-up terms: bounded by
    // a few full scales times the settling span, independent of run length.
    check(s2max < 64 * 1024 * 64, $sformatf("second-order shaping bound for x=%0d: %0d", xv, s2max));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 1; k <= 19; k++) dc_test(k * 1024 / 20);
    repeat (20) dc_test($urandom_range(60, 960));
    // slow ramp: average over each 256-clock step tracks the input
    for (int xv = 100; xv < 900; xv += 50) begin
      int ones;
      ones = 0;
      x = 10'(xv);
      repeat (64) @(negedge clk);
      repeat (1024) begin @(negedge clk); ones += int'(y); end
      check(ones >= xv - 8 && ones <= xv + 8, $sformatf("ramp step %0d: %0d ones in 1024", xv, ones));
    end
    // zero input empties the loop
    begin
      int ones = 0;
      x = '0;
      repeat (200) @(negedge clk);
      repeat (1000) begin @(negedge clk); ones += int'(y); end
      check(ones == 0, $sformatf("input 0 gives no ones (%0d)", ones));
    end
    dc_test(512);
    // clock enable
    begin
      logic held;
      en = 1'b0;
      held = y;
      x = 10'd300;
      repeat (100) begin @(negedge clk); check(y == held, "output frozen with en low"); end
      en = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
