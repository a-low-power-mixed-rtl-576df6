// window_adc: behavioural model (not synthesizable) of the windowed ADC and
// error subtraction of the voltage loop.
//
// On each sample strobe the attenuated output voltage v_in is quantised with
// a step of BIN volts (31.3 mV, the error bin of the prototype), the result
// is subtracted from the digital reference vref (one LSB per bin) and the
// difference is limited to the ADC window of -E_MAX..+E_MAX (nine values):
//     e[n] = clamp(vref - round(v_in / BIN), -4, +4)
// A real windowed ADC resolves only the bins around the reference; this
// model reaches the same nine outputs by clamping. The bin size and the
// nine-level window follow the design this is based on; the round-to-nearest
// quantiser and the reset value 0 are this model's choices.
// Timing: e is registered on the clock edge where sample is high.
module window_adc #(
  parameter real         BIN    = 0.0313,
  parameter int unsigned VREF_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample,
  input  real               v_in,
  input  logic [VREF_W-1:0] vref,
  output cpm_pkg::err_t     e
);
  import cpm_pkg::*;

  int code;   // quantised v_in
  int diff;   // vref - code before the window limit

  always_comb begin
    code = int'($floor(v_in / BIN + 0.5));
    diff = int'(vref) - code;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      e <= '0;
    else if (sample)
      e <= clamp_err(diff);
  end
endmodule
