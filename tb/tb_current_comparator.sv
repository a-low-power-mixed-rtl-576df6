// tb_current_comparator: random pairs of sensed-current and command
// voltages; comp must be high exactly when v_s > v_c, and must follow an
// input change without any clock.
`timescale 1ns/1ps
module tb_current_comparator;
  real v_s = 0.0, v_c = 0.0;
  logic comp;
  int checks = 0, failures = 0, n_hi = 0;

  current_comparator dut (.*);

  initial begin
    repeat (1000) begin
      int a, b;
      a = $urandom_range(0, 3000);
      b = $urandom_range(0, 3000);
      v_s = a / 1000.0;
      v_c = b / 1000.0;
      #1;
      checks++;
      n_hi += int'(comp);
      if (comp != (a > b)) begin failures++; $display("FAIL: v_s=%f v_c=%f comp=%0b", v_s, v_c, comp); end
    end
    // a ramp crossing the command
    v_c = 1.0;
    for (int k = 0; k < 200; k++) begin
      v_s = k * 0.01;
      #0.1;
      checks++;
      if (comp != (k > 100)) begin failures++; $display("FAIL: ramp k=%0d comp=%0b", k, comp); end
    end
    checks++;
    if (n_hi == 0) begin failures++; $display("FAIL: never high"); end
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
