// cpm_dcdc_top: dual-mode mixed-signal peak current-mode controller for a
// buck DC-DC converter, with the current command produced by a second-order
// one-bit delta-sigma DAC.
//
// Signal flow, once per switching period (CYC_PER_TSW master cycles):
//   window_adc      samples H1*v_out (v_fb), error e[n] = V_ref[n] - v_out
//                   in nine bins (-4..+4)
//   mode_selector   |e| > 2 -> transient mode, |e| <= 2 -> steady state
//   pi_compensator  i_c[n] = i_c[n-1] + A e[n] - B e[n-1] from lookup tables,
//                   clamped to 0..i_sat (programmable peak-current limit),
//                   updated every period (transient) or every 4th (steady)
//   ds_modulator    one-bit stream of i_c at 16 f_s (transient) or 8 f_s
//   dac_lpf         RC filter, R1 (steady) or R1||R2 (transient) -> v_c(t)
//   current_comparator  v_isense > v_c
//   pwm_latch       set at the start of the period, reset by the comparator
//                   (blanked at turn-on) or at 50 % of the period -> gate_hs
//   light_load_detect   i_c against programmed thresholds
// timing_gen derives all of these rates from the one master clock.
// The window ADC, RC filter and comparator are behavioural models with real
// (voltage) ports, so this top level is a simulation model of the mixed-
// signal controller; the digital blocks are synthesizable on their own.
// Interface: clk runs at 16 x f_s (16 MHz for f_s = 1 MHz); rst_n is an
// asynchronous active-low reset; vref is in ADC bins (31.3 mV per LSB);
// i_sat, th_enter, th_exit are M-bit command codes (full scale 2^M).
// The architecture follows the design this is based on; clocking everything
// from one master clock with enables is this design's choice.
module cpm_dcdc_top #(
  parameter int unsigned M           = 10,
  parameter int unsigned CYC_PER_TSW = 16,
  parameter int unsigned VREF_W      = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [VREF_W-1:0] vref,
  input  logic [M-1:0]      i_sat,
  input  logic [M-1:0]      th_enter,
  input  logic [M-1:0]      th_exit,
  input  real               v_fb,
  input  real               v_isense,
  output logic              gate_hs,
  output logic              mode,
  output logic              sel,
  output logic [3:0]        e,
  output logic [M-1:0]      i_c,
  output logic              sat_hit,
  output logic              dac_bit,
  output real               v_c,
  output logic              comp,
  output logic              blank,
  output logic              dlimit,
  output logic              clk_s,
  output logic              light_load
);
  import cpm_pkg::*;

  mode_t mode_q;
  err_t  err;
  logic  set_en, adc_sample, mode_upd, pi_en, dac_en;

  timing_gen #(.CYC_PER_TSW(CYC_PER_TSW)) u_timing (
    .clk(clk), .rst_n(rst_n), .mode(mode_q),
    .set_en(set_en), .blank(blank), .dlimit(dlimit), .clk_s(clk_s),
    .adc_sample(adc_sample), .mode_upd(mode_upd), .pi_en(pi_en), .dac_en(dac_en)
  );

  window_adc #(.VREF_W(VREF_W)) u_adc (
    .clk(clk), .rst_n(rst_n), .sample(adc_sample), .v_in(v_fb), .vref(vref), .e(err)
  );

  mode_selector u_mode (
    .clk(clk), .rst_n(rst_n), .update(mode_upd), .e(err), .mode(mode_q), .sel(sel)
  );

  pi_compensator #(.M(M)) u_pi (
    .clk(clk), .rst_n(rst_n), .en(pi_en), .mode(mode_q), .e(err),
    .i_sat(i_sat), .i_c(i_c), .sat_hit(sat_hit)
  );

  ds_modulator #(.M(M)) u_dsm (
    .clk(clk), .rst_n(rst_n), .en(dac_en), .x(i_c), .y(dac_bit)
  );

  dac_lpf #(.T_CLK(1.0e-6 / CYC_PER_TSW)) u_lpf (
    .clk(clk), .din(dac_bit), .sel(sel), .v_c(v_c)
  );

  current_comparator u_cmp (
    .v_s(v_isense), .v_c(v_c), .comp(comp)
  );

  pwm_latch u_latch (
    .clk(clk), .rst_n(rst_n), .set_en(set_en), .blank(blank), .dlimit(dlimit),
    .comp(comp), .gate(gate_hs)
  );

  light_load_detect #(.M(M)) u_light (
    .clk(clk), .rst_n(rst_n), .en(pi_en), .i_c(i_c),
    .th_enter(th_enter), .th_exit(th_exit), .light_load(light_load)
  );

  assign mode = mode_q;
  assign e    = err;
endmodule
