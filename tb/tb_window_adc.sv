// tb_window_adc: random output voltages around random references. The
// expected error is found here by searching for the bin centre n*BIN nearest
// to v_in (inputs within 2 mV of a bin edge are skipped), then clamped to the
// nine-value window. Also checks that e holds between sample strobes.
`timescale 1ns/1ps
module tb_window_adc;
  import cpm_pkg::*;
  localparam real BIN = 0.0313;
  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  real v_in = 0.0;
  logic [7:0] vref = 8'd48;
  err_t e;
  int checks = 0, failures = 0, n_clip = 0, n_in = 0;

  always #5 clk = ~clk;
  window_adc dut (.*);

  function automatic int nearest_bin(real v);
    int best;
    real bd, d, c;
    best = 0;
    bd = 1.0e9;
    for (int n = 0; n < 256; n++) begin
      c = n * BIN;
      d = v - c;
      if (d < 0.0) d = -d;
      if (d < bd) begin bd = d; best = n; end
    end
    return best;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (e != 0) begin failures++; $display("FAIL: reset value"); end
    repeat (2000) begin
      int want, n, r;
      real frac;
      err_t held;
      vref = 8'($urandom_range(30, 70));
      r = $urandom_range(0, 2000);
      r = r - 1000;
      v_in = (real'(vref) + r / 100.0) * BIN;
      if (v_in < 0.0) v_in = 0.0;
      frac = v_in / BIN - $floor(v_in / BIN);
      if (frac > 0.5 - 0.002 / BIN && frac < 0.5 + 0.002 / BIN) continue;
      n = nearest_bin(v_in);
      want = int'(vref) - n;
      if (want > 4) want = 4;
      if (want < -4) want = -4;
      if (want == 4 || want == -4) n_clip++; else n_in++;
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      checks++;
      if (int'(e) != want) begin
        failures++;
        if (failures < 20) $display("FAIL: v_in=%f vref=%0d e=%0d expected %0d", v_in, vref, e, want);
      end
      // no strobe: the output must hold
      held = e;
      v_in = v_in + 0.2;
      @(negedge clk);
      checks++;
      if (e != held) begin failures++; $display("FAIL: e changed without sample"); end
    end
    checks++;
    if (n_clip == 0 || n_in == 0) begin failures++; $display("FAIL: window edges not exercised"); end
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
