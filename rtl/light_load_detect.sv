// light_load_detect: digital comparator on the current command.
//
// In peak current-mode control the steady-state command i_c is a measure of
// the load current, which a voltage-mode controller does not know. This
// block compares i_c with two programmed thresholds on every compensator
// update (en) and raises light_load when i_c falls below th_enter; it clears
// the flag when i_c rises above th_exit. With th_exit >= th_enter the gap is
// a hysteresis band. The flag can select a more efficient light-load mode
// such as pulse-frequency modulation, which is not part of this design.
// Comparing i_c with programmed thresholds follows the design this is based
// on; the two-threshold hysteresis and reset to light_load = 0 are this
// design's choices. Timing: light_load changes on the edge where en is high.
module light_load_detect #(
  parameter int unsigned M = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] i_c,
  input  logic [M-1:0] th_enter,
  input  logic [M-1:0] th_exit,
  output logic         light_load
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      light_load <= 1'b0;
    else if (en) begin
      if (i_c < th_enter)
        light_load <= 1'b1;
      else if (i_c > th_exit)
        light_load <= 1'b0;
    end
  end
endmodule
