// tb_light_load_detect: random current commands against thresholds 150
// (enter) and 200 (exit); a reference flag with the same hysteresis rule is
// kept here. Checks that the flag only moves on enable and that both
// transitions occur.
`timescale 1ns/1ps
module tb_light_load_detect;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, light_load;
  logic [9:0] i_c = '0, th_enter = 10'd150, th_exit = 10'd200;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;
  bit ref_flag = 1'b0;

  always #5 clk = ~clk;
  light_load_detect dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2000) begin
      int v;
      bit e;
      v = $urandom_range(100, 250);
      e = ($urandom_range(0, 1) == 1);
      i_c = 10'(v); en = e;
      @(negedge clk);
      if (e) begin
        if (v < 150 && !ref_flag) begin ref_flag = 1'b1; n_on++; end
        else if (v > 200 && ref_flag) begin ref_flag = 1'b0; n_off++; end
      end
      checks++;
      if (light_load != ref_flag) begin failures++; $display("FAIL: i_c=%0d en=%0b flag=%0b", v, e, light_load); end
    end
    checks++;
    if (n_on == 0 || n_off == 0) begin failures++; $display("FAIL: transitions missing"); end
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
