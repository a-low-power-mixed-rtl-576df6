// timing_gen: clock-enable generator of the dual-mode controller.
//
// One master clock at CYC_PER_TSW times the switching frequency (16 MHz for
// the 1 MHz converter) drives the whole controller. A period counter
// cnt = 0..CYC_PER_TSW-1 spans one switching period, and every slower clock
// of the controller is a one-cycle enable derived from it:
//   set_en     high in the last cycle of a period; the RS latch sets on the
//              edge that starts the next period (cnt = 0).
//   blank      high in the last cycle and the first BLANK_CYCLES cycles:
//              the comparator may not reset the latch (leading-edge blanking).
//   dlimit     high from mid-period to the second-last cycle: forces the latch
//              reset, so the duty cycle never exceeds 50 %.
//   clk_s      the switching clock itself, high in the first half.
//   adc_sample once per period, at cnt = ADC_PHASE.
//   mode_upd   one cycle after adc_sample, when e[n] is valid.
//   pi_en      clk_PI: two cycles after adc_sample, every period in transient
//              mode and every PI_DIV_SS-th period in steady state.
//   dac_en     clk_DAC: every master cycle (16 f_s) in transient mode, every
//              DAC_DIV_SS-th cycle (8 f_s) in steady state.
// The clock ratios (f_s/4 and f_s for clk_PI, 8 f_s and 16 f_s for clk_DAC),
// the blanking and the 50 % limit follow the controller this design is based
// on; building them as enables of one clock, the blanking length and the ADC
// sampling phase are this design's choices. All outputs are decoded
// combinationally from registers.
module timing_gen #(
  parameter int unsigned CYC_PER_TSW  = 16,
  parameter int unsigned DAC_DIV_SS   = 2,
  parameter int unsigned PI_DIV_SS    = 4,
  parameter int unsigned BLANK_CYCLES = 1,
  parameter int unsigned ADC_PHASE    = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cpm_pkg::mode_t mode,
  output logic           set_en,
  output logic           blank,
  output logic           dlimit,
  output logic           clk_s,
  output logic           adc_sample,
  output logic           mode_upd,
  output logic           pi_en,
  output logic           dac_en
);
  import cpm_pkg::*;

  localparam int unsigned CW   = $clog2(CYC_PER_TSW);
  localparam int unsigned PW   = (PI_DIV_SS > 1) ? $clog2(PI_DIV_SS) : 1;
  localparam int unsigned LAST = CYC_PER_TSW - 1;
  localparam int unsigned HALF = CYC_PER_TSW / 2;

  logic [CW-1:0] cnt;     // position inside the switching period
  logic [PW-1:0] pcnt;    // switching periods inside one steady-state clk_PI

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      pcnt <= '0;
    end else if (cnt == CW'(LAST)) begin
      cnt  <= '0;
      pcnt <= (pcnt == PW'(PI_DIV_SS - 1)) ? '0 : pcnt + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    set_en     = (cnt == CW'(LAST));
    blank      = (cnt == CW'(LAST)) || (32'(cnt) < BLANK_CYCLES);
    dlimit     = (32'(cnt) >= HALF) && (cnt != CW'(LAST));
    clk_s      = (32'(cnt) < HALF);
    adc_sample = (cnt == CW'(ADC_PHASE));
    mode_upd   = (cnt == CW'(ADC_PHASE + 1));
    pi_en      = (cnt == CW'(ADC_PHASE + 2)) &&
                 ((mode == MODE_TRANSIENT) || (pcnt == '0));
    dac_en     = (mode == MODE_TRANSIENT) || ((32'(cnt) % DAC_DIV_SS) == 0);
  end

  initial begin
    assert (CYC_PER_TSW % DAC_DIV_SS == 0)
      else $error("CYC_PER_TSW must be a multiple of DAC_DIV_SS");
    assert (ADC_PHASE + 2 < CYC_PER_TSW)
      else $error("ADC_PHASE leaves no room for the PI update");
  end
endmodule
