// mode_selector: dual-mode decision of the controller.
//
// On every update strobe (once per switching period, one cycle after the
// windowed ADC has produced e[n]) the selector compares |e[n]| with THRESH:
// above it the controller enters transient mode (fast compensator clock,
// doubled modulator clock, filter resistor R2 switched in through sel);
// at or below it the controller returns to steady-state mode. The rule
// |e| > 2 -> transient, |e| <= 2 -> steady state is the one the design is
// based on; evaluating it every switching period, with no extra hysteresis,
// and resetting into steady-state mode are this design's choices.
// Timing: mode and sel change on the clock edge where update is high.
module mode_selector #(
  parameter int unsigned THRESH = cpm_pkg::MODE_THRESH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           update,
  input  cpm_pkg::err_t  e,
  output cpm_pkg::mode_t mode,
  output logic           sel
);
  import cpm_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      mode <= MODE_STEADY;
    else if (update)
      mode <= mode_for(e, THRESH);
  end

  // The filter select pin follows the mode: R1||R2 in transient mode.
  assign sel = (mode == MODE_TRANSIENT);
endmodule
