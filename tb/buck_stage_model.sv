// buck_stage_model: behavioural model of the converter's power stage and
// current sense path, for simulation only.
//
// A non-synchronous buck: while gate is high the inductor sees VIN - v_out,
// otherwise -v_out through the freewheeling diode (inductor current cannot go
// negative, so light loads run in discontinuous conduction). The output
// capacitor feeds a resistive load r_load. The state is integrated with a
// forward-Euler step of DT_NS nanoseconds. v_isense = KSRS * i_L while the
// high-side switch conducts, zero otherwise, plus a SPIKE volt pulse during
// the first SPIKE_NS after turn-on that imitates the reverse-recovery spike
// the latch has to blank. Values: VIN = 5 V, L = 2.5 uH, C = 36 uF (the
// prototype's); KSRS = 1 V/A and the spike are this model's choices.
`timescale 1ns/1ps
module buck_stage_model #(
  parameter real VIN      = 5.0,
  parameter real L        = 2.5e-6,
  parameter real C        = 36.0e-6,
  parameter real KSRS     = 1.0,
  parameter real SPIKE    = 2.0,
  parameter int  SPIKE_NS = 30,
  parameter int  DT_NS    = 1
) (
  input  logic gate,
  input  real  r_load,
  output real  v_out,
  output real  i_l,
  output real  v_isense
);
  localparam real DT = DT_NS * 1.0e-9;
  int  on_ns;
  real v_l;

  initial begin
    v_out    = 0.0;
    i_l      = 0.0;
    v_isense = 0.0;
    on_ns    = 0;
  end

  always begin
    #(DT_NS);
    v_l   = gate ? (VIN - v_out) : -v_out;
    i_l   = i_l + v_l * DT / L;
    if (i_l < 0.0) i_l = 0.0;
    v_out = v_out + (i_l - v_out / r_load) * DT / C;
    on_ns = gate ? on_ns + DT_NS : 0;
    v_isense = gate ? (KSRS * i_l + ((on_ns <= SPIKE_NS) ? SPIKE : 0.0)) : 0.0;
  end
endmodule
