// tb_pwm_latch: drives the latch with the period windows of a 16-cycle
// switching period (set strobe in cycle 15, blanking in cycles 15 and 0,
// duty limit in cycles 8..14) and a comparator pulse placed by the test:
//  - a comparator pulse inside the blanking window is ignored,
//  - a comparator pulse after blanking clears the gate at once, between
//    clock edges, and the gate stays low for the rest of the period,
//  - with no comparator pulse the gate is cleared when the duty limit
//    starts: exactly 8 of 16 cycles on (50 %),
//  - reset clears the gate.
`timescale 1ns/1ps
module tb_pwm_latch;
  logic clk = 1'b0, rst_n = 1'b0, set_en = 1'b0, blank = 1'b0, dlimit = 1'b0, comp = 1'b0, gate;
  int checks = 0, failures = 0;
  int p = 0;

  always #10 clk = ~clk;
  pwm_latch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // period windows, changed just after each rising edge like registered logic
  always @(posedge clk) begin
    #1;
    p = (p + 1) % 16;
    set_en = (p == 15);
    blank  = (p == 15 || p == 0);
    dlimit = (p >= 8 && p <= 14);
  end

  // Run one period; comp_at < 0 means no comparator event, otherwise the
  // comparator rises comp_at ns after the start of cycle comp_cycle.
  task automatic period(input int comp_cycle, input int comp_at, output int on_cycles);
    on_cycles = 0;
    // align to the start of cycle 0: the edge at which p leaves 15
    do @(posedge clk); while (p != 15);
    #2;
    for (int c = 0; c < 16; c++) begin
      if (c == comp_cycle) begin
        #(comp_at);
        comp = 1'b1;
        #1;
        if (blank) check(gate == 1'b1, "comparator ignored while blanked");
        else       check(gate == 1'b0, "comparator clears the gate at once");
        #2 comp = 1'b0;
      end
      // sample mid-cycle
      @(negedge clk);
      on_cycles += int'(gate);
      if (c < 15) begin
        @(posedge clk);
        #2;
      end
    end
  endtask

  initial begin
    int on;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    // no comparator: 50 % duty limit
    period(-1, 0, on);
    check(on == 8, $sformatf("duty limit: %0d of 16 cycles on", on));
    // comparator in the blanking window: ignored, then the limit applies
    period(0, 3, on);
    check(on == 8, $sformatf("blanked spike: %0d of 16 cycles on", on));
    // comparator at cycle 3 (+4 ns): gate on for cycles 0..2 only
    period(3, 4, on);
    check(on == 3, $sformatf("peak-current reset: %0d cycles on", on));
    // comparator at cycle 6
    period(6, 2, on);
    check(on == 6, $sformatf("peak-current reset: %0d cycles on", on));
    // comparator in cycle 1 right after blanking
    period(1, 2, on);
    check(on == 1, $sformatf("reset after blanking: %0d cycles on", on));
    // reset forces the gate low
    while (p != 2) @(posedge clk);
    #2;
    check(gate == 1'b1, "gate on early in the period");
    rst_n = 1'b0;
    #1;
    check(gate == 1'b0, "reset clears the gate");
    rst_n = 1'b1;
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
