// ds_modulator: second-order one-bit delta-sigma modulator of the current
// command DAC.
//
// The M-bit command x (0..2^M-1) is turned into a bit stream y whose average
// is x / 2^M; a first-order RC filter after it recovers the analog level.
// Two integrator registers and two adders implement
//     w1 <= w1 + x - y*2^M
//     w2 <= w2 + w1 - 2*y*2^M          (the factor two is a shift)
//     y   = (w2 >= 2^(M-1))
// which gives Y = z^-2 X + (1 - z^-1)^2 E: the quantisation noise is shaped
// by the second-order high-pass (1 - z^-1)^2. Because y is a single bit, the
// subtraction of y*2^M or 2*y*2^M only touches the top bits of each sum.
// The modulator order, the noise transfer function, the two registers, two
// adders and the gain-of-two shift follow the design this is based on; the
// exact loop arrangement (two delaying integrators with the output fed back
// to both), the integrator width M+5 and the reset to zero are this design's
// choices, as is limiting both integrators to +-4*2^M: a one-bit second-
// order loop is unstable for inputs at 0 or full scale, and the limit keeps
// it from wrapping around, so it recovers as soon as the input moves back
// into range. Like any such loop it loses linearity near 0 and full scale. Timing: the registers, and with them y, advance on
// each clock edge where en (clk_DAC) is high; y is a register output.
module ds_modulator #(
  parameter int unsigned M = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] x,
  output logic         y
);
  localparam int unsigned W = M + 5;
  localparam logic signed [W-1:0] FS   = W'(1) <<< M;        // 2^M
  localparam logic signed [W-1:0] HALF = W'(1) <<< (M - 1);  // 2^(M-1)

  localparam logic signed [W-1:0] LIM  = W'(1) <<< (M + 2);  // 4 * 2^M

  logic signed [W-1:0] w1, w2, s1, s2, w1_n, w2_n;

  function automatic logic signed [W-1:0] clamp(logic signed [W-1:0] v);
    if (v > LIM)       return LIM;
    else if (v < -LIM) return -LIM;
    else               return v;
  endfunction

  always_comb begin
    s1   = w1 + $signed({{(W-M){1'b0}}, x}) - (y ? FS : '0);
    s2   = w2 + w1 - (y ? (FS <<< 1) : '0);
    w1_n = clamp(s1);
    w2_n = clamp(s2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1 <= '0;
      w2 <= '0;
      y  <= 1'b0;
    end else if (en) begin
      w1 <= w1_n;
      w2 <= w2_n;
      y  <= (w2_n >= HALF);
    end
  end
endmodule
