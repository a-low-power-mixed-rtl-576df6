// tb_timing_gen: checks every enable of the clock generator cycle by cycle
// against positions computed from the testbench's own cycle counter, in both
// modes, and checks the rates per switching period: 8 (steady state) or 16
// (transient) clk_DAC enables, one clk_PI enable per 4 periods or per period,
// one latch set, one ADC sample, a 50 % switching clock.
`timescale 1ns/1ps
module tb_timing_gen;
  import cpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_t mode = MODE_STEADY;
  logic set_en, blank, dlimit, clk_s, adc_sample, mode_upd, pi_en, dac_en;
  int checks = 0, failures = 0;
  int cyc = 0;                     // master cycles since reset release
  int n_dac = 0, n_pi = 0, n_set = 0, n_adc = 0, n_clks = 0;

  always #5 clk = ~clk;

  timing_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at cycle %0d", what, cyc);
    end
  endtask

  // Expected enables at cycle position p of period k.
  always @(negedge clk) if (rst_n) begin
    int p, k;
    p = cyc % 16;
    k = cyc / 16;
    check(set_en     == (p == 15), "set_en");
    check(blank      == (p == 15 || p == 0), "blank");
    check(dlimit     == (p >= 8 && p <= 14), "dlimit");
    check(clk_s      == (p < 8), "clk_s");
    check(adc_sample == (p == 8), "adc_sample");
    check(mode_upd   == (p == 9), "mode_upd");
    check(pi_en      == (p == 10 && (mode == MODE_TRANSIENT || k % 4 == 0)), "pi_en");
    check(dac_en     == (mode == MODE_TRANSIENT || p % 2 == 0), "dac_en");
    n_dac  += int'(dac_en);
    n_pi   += int'(pi_en);
    n_set  += int'(set_en);
    n_adc  += int'(adc_sample);
    n_clks += int'(clk_s);
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic run_periods(input int n, input int dac_per, input int pi_total);
    n_dac = 0; n_pi = 0; n_set = 0; n_adc = 0; n_clks = 0;
    repeat (16 * n) @(posedge clk);
    @(negedge clk);
    check(n_dac == dac_per * n, $sformatf("clk_DAC rate: %0d enables in %0d periods", n_dac, n));
    check(n_pi == pi_total, $sformatf("clk_PI rate: %0d updates in %0d periods", n_pi, n));
    check(n_set == n && n_adc == n, "one latch set and one ADC sample per period");
    check(n_clks == 8 * n, "switching clock duty 50%");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Steady state: 16 periods (starting at a period boundary after reset)
    // hold 4 compensator updates and 8 x 16 modulator clocks.
    run_periods(16, 8, 4);
    mode = MODE_TRANSIENT;
    run_periods(16, 16, 16);
    mode = MODE_STEADY;
    run_periods(8, 8, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
