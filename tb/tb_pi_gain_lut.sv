// tb_pi_gain_lut: reads every entry of both gain tables (two modes, nine
// error values) and compares it with A*e and B*e computed here from the
// default gains: steady state A = 8, B = 7; transient A = 28, B = 27.
`timescale 1ns/1ps
module tb_pi_gain_lut;
  import cpm_pkg::*;
  mode_t mode;
  err_t  e;
  logic signed [9:0] ae, be;
  int checks = 0, failures = 0;
  localparam int GA [2] = '{8, 28};
  localparam int GB [2] = '{7, 27};

  pi_gain_lut dut (.*);

  initial begin
    for (int m = 0; m < 2; m++)
      for (int v = -4; v <= 4; v++) begin
        mode = mode_t'(m);
        e = err_t'(v);
        #1;
        checks += 2;
        if (int'(ae) != GA[m] * v) begin
          failures++; $display("FAIL: A*e mode=%0d e=%0d got %0d", m, v, ae);
        end
        if (int'(be) != GB[m] * v) begin
          failures++; $display("FAIL: B*e mode=%0d e=%0d got %0d", m, v, be);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
