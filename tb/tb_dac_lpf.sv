// tb_dac_lpf: step responses of the adaptive RC filter model. With a
// constant 1 at the input the output after n clocks must be
// VSWING * (1 - exp(-n*T/tau)) with tau = 8 us (sel low) or 1.6 us (sel
// high); the discharge likewise. A 25 % duty bit pattern must settle to
// 0.25 * VSWING with sel high. Values are computed here from the time
// constants, not from the model.
`timescale 1ns/1ps
module tb_dac_lpf;
  localparam real VS = 3.3, T = 62.5e-9, TAU1 = 8.0e-6, TAU2 = 1.6e-6;
  logic clk = 1'b0, din = 1'b0, sel = 1'b0;
  real v_c;
  int checks = 0, failures = 0;

  always #31.25 clk = ~clk;
  dac_lpf dut (.*);

  task automatic check_near(input real got, input real want, input real tol, input string what);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("FAIL: %s: got %f expected %f", what, got, want);
    end
  endtask

  initial begin
    @(negedge clk);
    check_near(v_c, 0.0, 1e-9, "starts discharged");
    din = 1'b1; sel = 1'b0;
    for (int n = 1; n <= 256; n++) begin
      @(negedge clk);
      if (n % 32 == 0) check_near(v_c, VS * (1.0 - $exp(-n * T / TAU1)), 1e-6, $sformatf("charge via R1, n=%0d", n));
    end
    // finish charging quickly via R1||R2, then discharge via R1||R2
    sel = 1'b1;
    repeat (600) @(negedge clk);
    check_near(v_c, VS, 1e-3, "full charge");
    din = 1'b0;
    for (int n = 1; n <= 64; n++) begin
      @(negedge clk);
      if (n % 8 == 0) check_near(v_c, VS * $exp(-n * T / TAU2), 2e-3, $sformatf("discharge via R1||R2, n=%0d", n));
    end
    // 25 % duty stream
    repeat (2000) begin
      @(negedge clk) din = 1'b1;
      repeat (3) @(negedge clk) din = 1'b0;
    end
    begin
      real acc;
      acc = 0.0;
      repeat (400) begin @(negedge clk) din = 1'b1; acc += v_c; repeat (3) begin @(negedge clk) din = 1'b0; acc += v_c; end end
      check_near(acc / 1600.0, 0.25 * VS, 0.02, "25% duty average");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
