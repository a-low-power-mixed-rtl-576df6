// dac_lpf: behavioural model (not synthesizable) of the adaptive first-order
// RC reconstruction filter of the one-bit DAC.
//
// The bit stream din drives the filter input between 0 V and VSWING. With
// sel low only R1 feeds the capacitor Cc (time constant TAU1 = R1*Cc, corner
// f_c1); with sel high R2 is switched in parallel (TAU2 = (R1||R2)*Cc, corner
// f_c2 > f_c1). Because din only changes on clock edges, the model advances
// the exact solution of the RC equation by one master period T_CLK per edge:
//     v_c <= v_t + (v_c - v_t) * exp(-T_CLK / tau),  v_t = din ? VSWING : 0
// The first-order RC topology and the resistor switched by sel follow the
// design this is based on; VSWING and the two time constants (corners of
// about 20 kHz and 100 kHz) are this model's choices. The capacitor starts
// discharged.
module dac_lpf #(
  parameter real VSWING = 3.3,
  parameter real TAU1   = 8.0e-6,
  parameter real TAU2   = 1.6e-6,
  parameter real T_CLK  = 62.5e-9
) (
  input  logic clk,
  input  logic din,
  input  logic sel,
  output real  v_c
);
  localparam real K1 = $exp(-T_CLK / TAU1);
  localparam real K2 = $exp(-T_CLK / TAU2);

  real v_t;
  real k;

  initial v_c = 0.0;

  always_comb begin
    v_t = din ? VSWING : 0.0;
    k   = sel ? K2 : K1;
  end

  always @(posedge clk)
    v_c <= v_t + (v_c - v_t) * k;
endmodule
