// cpm_pkg: types and constants shared by the dual-mode peak current-mode
// controller. The error e[n] is a small signed number in -E_MAX..+E_MAX
// (nine windowed-ADC bins); the controller runs in one of two modes that
// set the compensator clock, the modulator clock and the DAC filter corner.
package cpm_pkg;

  // Nine error bins, -4..+4, as produced by the windowed ADC.
  localparam int E_MAX = 4;
  localparam int E_W   = 4;
  typedef logic signed [E_W-1:0] err_t;

  // Mode 0: steady state (clk_PI = f_s/4, clk_DAC = 8 f_s, filter R1).
  // Mode 1: transient    (clk_PI = f_s,   clk_DAC = 16 f_s, filter R1||R2).
  typedef enum logic {
    MODE_STEADY    = 1'b0,
    MODE_TRANSIENT = 1'b1
  } mode_t;

  // |e| above which the controller enters transient mode.
  localparam int MODE_THRESH = 2;

  function automatic int unsigned abs_err(err_t e);
    return (e < 0) ? -int'(e) : int'(e);
  endfunction

  // Limit a raw difference to the nine-value error window.
  function automatic err_t clamp_err(int d);
    if (d > E_MAX)       return err_t'(E_MAX);
    else if (d < -E_MAX) return err_t'(-E_MAX);
    else                 return err_t'(d);
  endfunction

  // Mode rule: transient while |e| exceeds the threshold.
  function automatic mode_t mode_for(err_t e, int unsigned thresh = MODE_THRESH);
    return (abs_err(e) > thresh) ? MODE_TRANSIENT : MODE_STEADY;
  endfunction

endpackage
