// tb_mode_selector: applies every error value -4..+4 with and without the
// update strobe and checks the mode (transient only for |e| > 2), the filter
// select pin and that the mode holds between updates.
`timescale 1ns/1ps
module tb_mode_selector;
  import cpm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, update = 1'b0, sel;
  err_t e = '0;
  mode_t mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mode_selector dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(mode == MODE_STEADY && sel == 1'b0, "reset into steady state");
    for (int rep = 0; rep < 3; rep++)
      for (int v = -4; v <= 4; v++) begin
        bit want, was_tr;
        was_tr = (mode == MODE_TRANSIENT);
        // without the strobe nothing changes
        e = err_t'(v); update = 1'b0;
        @(negedge clk);
        check((mode == MODE_TRANSIENT) == was_tr, $sformatf("mode held without update, e=%0d", v));
        update = 1'b1;
        @(negedge clk);
        update = 1'b0;
        want = (v > 2 || v < -2);
        check((mode == MODE_TRANSIENT) == want, $sformatf("mode for e=%0d", v));
        check(sel == want, $sformatf("sel for e=%0d", v));
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
