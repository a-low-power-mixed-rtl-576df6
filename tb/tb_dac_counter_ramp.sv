// tb_dac_counter_ramp: the one-bit DAC (second-order modulator at 8 f_s plus
// the steady-state RC filter) fed by a slow 10-bit up-counter, as in a DAC
// linearity measurement. The counter advances every 32 master cycles (2 us),
// so it sweeps 0..1023 in about 2 ms. Over windows of 16 codes the average of
// v_c is compared with the ideal ramp VSWING * code / 1024, corrected for the
// known lag of a first-order filter on a ramp (tau * slope). Codes between 5 %
// and 95 % of full scale must be within 8 mV (2.5 LSB); the largest error near
// the ends, where a one-bit second-order loop loses linearity, is reported.
`timescale 1ns/1ps
module tb_dac_counter_ramp;
  localparam real VS = 3.3, TAU1 = 8.0e-6, T = 62.5e-9;
  localparam int  HOLD = 32;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, y;
  logic [9:0] x = '0;
  real v_c;
  int checks = 0, failures = 0;

  always #31.25 clk = ~clk;

  ds_modulator u_dsm (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));
  dac_lpf      u_lpf (.clk(clk), .din(y), .sel(1'b0), .v_c(v_c));

  // 8 f_s modulator clock: every other master cycle
  always @(posedge clk) en <= rst_n ? ~en : 1'b0;

  initial begin
    real slope, lag, acc, want, err, worst_end;
    int  n, code_acc;
    slope = (VS / 1024.0) / (HOLD * T);     // volts per second
    lag   = slope * TAU1;
    worst_end = 0.0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 1024; c += 16) begin
      acc = 0.0; n = 0; code_acc = 0;
      for (int k = 0; k < 16; k++) begin
        x = 10'(c + k);
        repeat (HOLD) begin
          @(negedge clk);
          acc += v_c; n++; code_acc += c + k;
        end
      end
      if (c >= 32) begin
        want = VS * (code_acc / real'(n)) / 1024.0 - lag;
        err  = acc / n - want;
        if (err < 0) err = -err;
        if (c >= 48 && c + 16 <= 976) begin
          checks++;
          if (err > 0.008) begin
            failures++;
            $display("FAIL: codes %0d..%0d: v_c avg %f, ideal %f", c, c + 15, acc / n, want);
          end
        end else if (err > worst_end) worst_end = err;
      end
    end
    $display("largest error near the ends of the range: %0.1f mV", worst_end * 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
