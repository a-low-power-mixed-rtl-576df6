// pi_compensator: LUT-based PI voltage-loop compensator with programmable
// current limit.
//
// On every clk_PI enable (en) it evaluates the PI difference equation
//     i_c[n] = i_c[n-1] + A*e[n] - B*e[n-1]
// where A*e and B*e come from pi_gain_lut for the current mode. B*e[n] is
// registered so that the next update subtracts B*e[n-1] without a second
// lookup. The sum is then clamped to 0..i_sat: by the peak-current relation
// i_peak = i_sat / 2^M * V_swing / (Ks*Rs) the programmable saturation value
// sets the peak inductor current limit. The clamped value is what is fed
// back as i_c[n-1] (no integrator wind-up). The equation and the saturation
// block come from the design this is based on; the clamp at zero, the
// anti-wind-up feedback, storing B*e[n] with the gain of the mode it was
// produced in, and reset to i_c = 0 (soft start) are this design's choices.
// Timing: i_c changes on the edge where en is high; sat_hit tells whether
// that update was limited.
module pi_compensator #(
  parameter int unsigned M      = 10,
  parameter int unsigned GAIN_W = 10,
  parameter int          A_SS   = 8,
  parameter int          B_SS   = 7,
  parameter int          A_TR   = 28,
  parameter int          B_TR   = 27
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  cpm_pkg::mode_t mode,
  input  cpm_pkg::err_t  e,
  input  logic [M-1:0]   i_sat,
  output logic [M-1:0]   i_c,
  output logic           sat_hit
);
  import cpm_pkg::*;

  localparam int unsigned SW = (M > GAIN_W ? M : GAIN_W) + 3;

  logic signed [GAIN_W-1:0] ae, be, be_prev;
  logic signed [SW-1:0]     sum;
  logic [M-1:0]             nxt;
  logic                     clip;

  pi_gain_lut #(
    .GAIN_W(GAIN_W), .A_SS(A_SS), .B_SS(B_SS), .A_TR(A_TR), .B_TR(B_TR)
  ) u_lut (
    .mode(mode), .e(e), .ae(ae), .be(be)
  );

  always_comb begin
    sum = $signed({{(SW-M){1'b0}}, i_c}) + SW'(ae) - SW'(be_prev);
    if (sum < 0) begin
      nxt  = '0;
      clip = 1'b1;
    end else if (sum > $signed({{(SW-M){1'b0}}, i_sat})) begin
      nxt  = i_sat;
      clip = 1'b1;
    end else begin
      nxt  = M'(sum);
      clip = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_c     <= '0;
      be_prev <= '0;
      sat_hit <= 1'b0;
    end else if (en) begin
      i_c     <= nxt;
      be_prev <= be;
      sat_hit <= clip && (sum > 0);
    end
  end
endmodule
