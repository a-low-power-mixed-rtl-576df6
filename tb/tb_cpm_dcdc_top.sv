// tb_cpm_dcdc_top: end-to-end test of the dual-mode current-mode controller
// closing the loop around a buck power stage model (5 V to 1.5 V, 1 MHz,
// L = 2.5 uH, C = 36 uF), with all top-level parameters at their defaults.
//
// Sequence: soft start at 0.46 A, light load (0.1 A), the 0.46 A -> 1.1 A load
// step and back, an overload that drives the command into the programmable
// current limit, recovery, and a 1.5 V -> 2.0 V -> 1.5 V reference step that
// runs into the 50 % duty limit. After each phase the output must sit within
// two ADC bins of the reference, and the controller must have returned to
// steady-state mode. The 0.46 A -> 1.1 A step must settle (back to steady
// state and within two bins) inside SETTLE_US. The testbench counts every
// mechanism of the controller (mode switches both ways, compensator updates
// in both modes, comparator turn-off, 50 % duty limit, blanked spikes,
// current-limit saturation, light-load flag) and fails any that never occurs.
// It also checks the clock rates of the two modes at all times: per
// switching period 8 (steady) or 16 (transient) modulator clocks, and one
// compensator update per 4 periods (steady) or per period (transient).
`timescale 1ns/1ps
module tb_cpm_dcdc_top;
  localparam real T_HALF    = 31.25;      // 16 MHz master clock
  localparam real BIN       = 0.0313;
  localparam int  SETTLE_US = 50;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [7:0]  vref = 8'd48;
  logic [9:0]  i_sat = 10'd620;
  logic [9:0]  th_enter = 10'd100;
  logic [9:0]  th_exit = 10'd130;
  real         r_load = 1.5 / 0.46;
  real         v_out, i_l, v_isense, v_c;
  logic        gate_hs, mode, sel, sat_hit, dac_bit, comp, blank, dlimit, clk_s, light_load;
  logic [3:0]  e;
  logic [9:0]  i_c;

  int checks = 0, failures = 0;

  always #(T_HALF) clk = ~clk;

  cpm_dcdc_top dut (
    .clk(clk), .rst_n(rst_n), .vref(vref), .i_sat(i_sat), .th_enter(th_enter), .th_exit(th_exit),
    .v_fb(v_out), .v_isense(v_isense), .gate_hs(gate_hs), .mode(mode), .sel(sel), .e(e),
    .i_c(i_c), .sat_hit(sat_hit), .dac_bit(dac_bit), .v_c(v_c), .comp(comp), .blank(blank),
    .dlimit(dlimit), .clk_s(clk_s), .light_load(light_load)
  );

  buck_stage_model u_plant (
    .gate(gate_hs), .r_load(r_load), .v_out(v_out), .i_l(i_l), .v_isense(v_isense)
  );

  // ---------------- mechanism counters ----------------
  int n_to_tr = 0, n_to_ss = 0, n_pi_ss = 0, n_pi_tr = 0, n_peak_off = 0, n_dlimit_off = 0;
  int n_blanked = 0, n_sat = 0, n_light_on = 0, n_light_off = 0, n_rate_err = 0, n_periods = 0;
  logic mode_d = 1'b0, light_d = 1'b0, gate_d = 1'b0, blanked_seen = 1'b0;
  int   dac_cnt = 0, pi_cnt = 0, per_in_mode = 0;
  logic mode_period = 1'b0;

  // Turn-off cause: comparator (outside blanking, before the limit) or limit.
  always @(negedge gate_hs) if (rst_n) begin
    if (dlimit) n_dlimit_off++;
    else if (comp) n_peak_off++;
  end

  always @(posedge clk) if (rst_n) begin
    if (mode && !mode_d) n_to_tr++;
    if (!mode && mode_d) n_to_ss++;
    mode_d <= mode;
    if (light_load && !light_d) n_light_on++;
    if (!light_load && light_d) n_light_off++;
    light_d <= light_load;
    if (blank && comp && gate_hs) blanked_seen <= 1'b1;
    if (dut.u_timing.set_en) begin
      if (blanked_seen) n_blanked++;
      blanked_seen <= 1'b0;
    end
    if (dut.u_timing.pi_en) begin
      if (mode) n_pi_tr++; else n_pi_ss++;
    end
  end

  always @(posedge sat_hit) n_sat++;

  // Rate check: count clk_DAC enables over each switching period (the last
  // cycle of the period decides the mode the period ran in), and compensator
  // updates over spans of four periods spent in one mode.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_timing.set_en) begin
      int want;
      want = (mode_period ? 16 : 8);
      // only judge periods in which the mode did not change
      if (mode == mode_period && n_periods > 0) begin
        if (dac_cnt + int'(dut.u_timing.dac_en) != want) n_rate_err++;
      end
      dac_cnt     <= 0;
      mode_period <= mode;
      n_periods++;
    end else begin
      dac_cnt <= dac_cnt + int'(dut.u_timing.dac_en);
    end
  end

  // PI rate: over every window of 4 whole periods in one mode.
  int win_pi = 0, win_per = 0;
  logic win_mode = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_timing.set_en) begin
      if (mode != win_mode) begin
        win_mode <= mode; win_per <= 0; win_pi <= 0;
      end else if (win_per == 3) begin
        if (win_pi + int'(dut.u_timing.pi_en) != (win_mode ? 4 : 1)) n_rate_err++;
        win_per <= 0; win_pi <= 0;
      end else begin
        win_per <= win_per + 1; win_pi <= win_pi + int'(dut.u_timing.pi_en);
      end
    end else begin
      win_pi <= win_pi + int'(dut.u_timing.pi_en);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t v_out=%f i_c=%0d mode=%0d)", what, $time, v_out, i_c, mode);
    end
  endtask

  task automatic run_us(input int us);
    repeat (us * 16) @(posedge clk);
  endtask

  task automatic check_regulated(input string phase);
    real err_v;
    err_v = v_out - vref * BIN;
    if (err_v < 0) err_v = -err_v;
    check(err_v < 2.0 * BIN + 0.5 * BIN, {phase, ": output within two bins of the reference"});
    check(mode == 1'b0, {phase, ": back in steady-state mode"});
    $display("%s: v_out=%f i_L=%f i_c=%0d mode=%0d", phase, v_out, i_l, i_c, mode);
  endtask

  // Watch the output for window_us after a load step and return the time of
  // the last microsecond in which it was outside two bins of the reference or
  // the controller was in transient mode (0 if it never left steady state).
  task automatic settle(output int us_taken, input int window_us);
    real err_v;
    us_taken = 0;
    for (int t = 1; t <= window_us; t++) begin
      run_us(1);
      err_v = v_out - vref * BIN;
      if (err_v < 0) err_v = -err_v;
      if (mode == 1'b1 || err_v >= 2.0 * BIN + 0.5 * BIN) us_taken = t;
    end
  endtask

  int t_up, t_down;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    run_us(400);
    check_regulated("start-up at 0.46 A");

    r_load = 1.5 / 0.1;
    run_us(400);
    check_regulated("light load 0.1 A");
    check(light_load == 1'b1, "light-load flag set at 0.1 A");

    r_load = 1.5 / 0.46;
    run_us(300);
    check_regulated("back to 0.46 A");
    check(light_load == 1'b0, "light-load flag clear at 0.46 A");

    // Quiet steady state: the DAC ripple must not disturb regulation. Over
    // 400 us the controller stays in steady-state mode and every sampled
    // error falls in the zero-error bin of the ADC.
    begin
      int n0, n1, nbig, tr0;
      n0 = 0; n1 = 0; nbig = 0;
      tr0 = n_to_tr;
      repeat (400 * 16) begin
        @(posedge clk);
        if (dut.u_timing.mode_upd) begin
          if ($signed(e) == 0) n0++;
          else if ($signed(e) == 1 || $signed(e) == -1) n1++;
          else nbig++;
        end
      end
      $display("steady state error histogram: e=0 %0d, |e|=1 %0d, |e|>1 %0d", n0, n1, nbig);
      check(n1 == 0 && nbig == 0 && n_to_tr == tr0, "steady state: e = 0 throughout, no transient mode");
    end

    r_load = 1.5 / 1.1;
    settle(t_up, 200);
    $display("0.46 A -> 1.1 A step settled in %0d us", t_up);
    check(t_up > 0 && t_up <= SETTLE_US, "load step up: transient seen and settled in time");
    check_regulated("1.1 A");

    r_load = 1.5 / 0.46;
    settle(t_down, 200);
    $display("1.1 A -> 0.46 A step settled in %0d us", t_down);
    check(t_down > 0 && t_down <= SETTLE_US, "load step down: transient seen and settled in time");
    check_regulated("0.46 A after step");

    // Overload: 3 A needs far more than the 2 A peak the limit allows.
    r_load = 1.5 / 3.0;
    run_us(150);
    check(i_c == i_sat, "command held at the current limit in overload");
    check(i_l < 2.2, "inductor current bounded by the limit");
    $display("overload: v_out=%f i_L=%f i_c=%0d", v_out, i_l, i_c);
    r_load = 1.5 / 0.46;
    run_us(500);
    check_regulated("recovery from overload");

    // Reference step 1.5 V -> 2.0 V with the full current range allowed:
    // the command exceeds what the inductor reaches in half a period, so
    // the 50 % duty limit ends the pulses until the output has caught up.
    begin
      int lim0;
      lim0 = n_dlimit_off;
      i_sat = 10'd1000;
      vref = 8'd64;
      run_us(300);
      check_regulated("reference 2.0 V");
      check(n_dlimit_off > lim0, "duty limit reached after the reference step");
      vref = 8'd48;
      i_sat = 10'd620;
      run_us(400);
      check_regulated("reference back to 1.5 V");
    end

    check(n_to_tr > 0, "mode switch to transient happened");
    check(n_to_ss > 0, "mode switch to steady state happened");
    check(n_pi_ss > 0 && n_pi_tr > 0, "compensator ran in both modes");
    check(n_peak_off > 0, "peak-current turn-off happened");
    check(n_dlimit_off > 0, "50% duty limit happened");
    check(n_blanked > 0, "turn-on spike blanked");
    check(n_sat > 0, "current-limit saturation happened");
    check(n_light_on > 0 && n_light_off > 0, "light-load flag set and cleared");
    check(n_rate_err == 0, "clk_DAC and clk_PI rates per mode");
    $display("counts: to_tr=%0d to_ss=%0d pi_ss=%0d pi_tr=%0d peak_off=%0d dlimit_off=%0d blanked=%0d sat=%0d light_on=%0d light_off=%0d rate_err=%0d",
             n_to_tr, n_to_ss, n_pi_ss, n_pi_tr, n_peak_off, n_dlimit_off, n_blanked, n_sat,
             n_light_on, n_light_off, n_rate_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(6_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // progress trace
  initial forever begin
    #(10_000);
    $display("t=%0t us v_out=%f i_L=%f i_c=%0d e=%0d mode=%0d v_c=%f", $time/1000, v_out, i_l, i_c, $signed(e), mode, v_c);
  end
endmodule
