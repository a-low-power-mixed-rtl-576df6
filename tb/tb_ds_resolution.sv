// tb_ds_resolution: effective resolution of the one-bit DAC against its
// oversampling ratio. The modulator runs at a set of DC inputs; its bit
// stream is averaged with a triangular (sinc^2) window of 2*OSR-1 taps, the
// ideal decimator for a second-order loop, and the RMS deviation of the
// averaged output from x/1024 is measured for OSR = 16 (transient mode) and
// OSR = 32 (steady state). Second-order noise shaping gains about 1.5 bits,
// 9 dB, per doubling of the OSR; the test requires at least 7 dB. At OSR 32
// every input must stay within 2 LSB of 10 bits, and the mean over all
// inputs within 1.5 LSB.
`timescale 1ns/1ps
module tb_ds_resolution;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, y;
  logic [9:0] x = '0;
  int checks = 0, failures = 0;
  localparam int NS = 8192;
  bit stream [NS];

  always #5 clk = ~clk;
  ds_modulator dut (.*);

  // RMS error (in units of full scale) of the triangular-window average.
  function automatic real tri_rms(int osr, real ideal);
    real acc, w, wsum, err2;
    int n;
    err2 = 0.0; n = 0;
    for (int s = 0; s + 2 * osr - 1 <= NS; s += osr) begin
      acc = 0.0; wsum = 0.0;
      for (int k = 0; k < 2 * osr - 1; k++) begin
        w = (k < osr) ? (k + 1) : (2 * osr - 1 - k);
        acc += w * stream[s + k];
        wsum += w;
      end
      err2 += (acc / wsum - ideal) * (acc / wsum - ideal);
      n++;
    end
    return $sqrt(err2 / n);
  endfunction

  initial begin
    real e16, e32, e16_sum, e32_sum, gain_db;
    e16_sum = 0.0; e32_sum = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 12; i++) begin
      int xv;
      xv = 101 + i * 67;
      x = 10'(xv);
      repeat (300) @(negedge clk);
      for (int k = 0; k < NS; k++) begin
        @(negedge clk);
        stream[k] = y;
      end
      e16 = tri_rms(16, xv / 1024.0);
      e32 = tri_rms(32, xv / 1024.0);
      e16_sum += e16 * e16;
      e32_sum += e32 * e32;
      checks++;
      if (e32 * 1024.0 > 2.0) begin
        failures++;
        $display("FAIL: x=%0d OSR 32 error %f LSB", xv, e32 * 1024.0);
      end
    end
    gain_db = 10.0 * $log10(e16_sum / e32_sum);
    $display("RMS error OSR 16: %f LSB, OSR 32: %f LSB, improvement %0.1f dB",
             $sqrt(e16_sum / 12.0) * 1024.0, $sqrt(e32_sum / 12.0) * 1024.0, gain_db);
    checks++;
    if ($sqrt(e32_sum / 12.0) * 1024.0 > 1.5) begin
      failures++;
      $display("FAIL: mean OSR 32 error above 1.5 LSB");
    end
    checks++;
    if (gain_db < 7.0) begin
      failures++;
      $display("FAIL: doubling the OSR gained only %0.1f dB", gain_db);
    end
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
