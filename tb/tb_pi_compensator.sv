// tb_pi_compensator: random error sequences, random modes and random update
// enables, compared against a reference model of
//   i_c[n] = clamp(i_c[n-1] + A e[n] - B e[n-1], 0, i_sat)
// where B e[n-1] uses the gain of the mode in which e[n-1] was applied.
// Runs of large positive and negative errors drive the output into both
// saturation limits; i_sat is changed on the fly; sat_hit is checked.
`timescale 1ns/1ps
module tb_pi_compensator;
  import cpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, sat_hit;
  mode_t mode = MODE_STEADY;
  err_t e = '0;
  logic [9:0] i_sat = 10'd700, i_c;
  int checks = 0, failures = 0;
  int ref_ic = 0, ref_be = 0, n_hi = 0, n_lo = 0;
  localparam int GA [2] = '{8, 28};
  localparam int GB [2] = '{7, 27};

  always #5 clk = ~clk;
  pi_compensator dut (.*);

  task automatic step(input int m, input int v, input bit do_en);
    int s;
    bit clip;
    @(negedge clk);
    mode = mode_t'(m); e = err_t'(v); en = do_en;
    @(negedge clk);
    en = 1'b0;
    if (do_en) begin
      s = ref_ic + GA[m] * v - ref_be;
      clip = 1'b0;
      if (s < 0) begin s = 0; n_lo++; end
      else if (s > int'(i_sat)) begin s = int'(i_sat); clip = 1'b1; n_hi++; end
      ref_ic = s;
      ref_be = GB[m] * v;
      checks++;
      if (sat_hit != clip) begin failures++; $display("FAIL: sat_hit %0b expected %0b", sat_hit, clip); end
    end
    checks++;
    if (int'(i_c) != ref_ic) begin
      failures++;
      if (failures < 20) $display("FAIL: i_c=%0d expected %0d (m=%0d e=%0d en=%0b)", i_c, ref_ic, m, v, do_en);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (i_c != 0) begin failures++; $display("FAIL: reset value"); end
    // climb into the upper limit
    repeat (200) step(1, 4, 1'b1);
    // change the limit while saturated
    i_sat = 10'd300;
    repeat (5) step(1, 1, 1'b1);
    i_sat = 10'd700;
    // fall to zero
    repeat (200) step(1, -4, 1'b1);
    // random mix
    repeat (3000) step($urandom_range(0, 1), $urandom_range(0, 8) - 4, $urandom_range(0, 3) != 0);
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL: both limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
