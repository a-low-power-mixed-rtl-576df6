// pi_gain_lut: lookup tables of the PI compensator.
//
// The compensator never multiplies: for each of the nine error values
// e = -4..+4 the products A*e and B*e are read from two small tables, one
// pair of tables per controller mode (gentle gains in steady state, more
// aggressive gains in transient mode). Table entry k holds the product for
// e = k - E_MAX, i.e. lut_a[mode][k] = A_mode * (k - E_MAX). The tables are
// constants built at elaboration from the gain parameters; non-linear tables
// can be obtained by editing the fill loop. Lookup tables and two gain sets are
// what the design is based on; the gain values themselves are this design's
// choice, tuned for the 5 V to 1.5 V, 1 MHz buck stage of the end-to-end
// testbench. Purely combinational: ae and be follow mode and e.
module pi_gain_lut #(
  parameter int unsigned GAIN_W = 10,
  parameter int          A_SS   = 8,
  parameter int          B_SS   = 7,
  parameter int          A_TR   = 28,
  parameter int          B_TR   = 27
) (
  input  cpm_pkg::mode_t            mode,
  input  cpm_pkg::err_t             e,
  output logic signed [GAIN_W-1:0]  ae,
  output logic signed [GAIN_W-1:0]  be
);
  import cpm_pkg::*;

  localparam int N = 2 * E_MAX + 1;
  // Table entry k holds the product for e = k - E_MAX; row 0 is the
  // steady-state gain set, row 1 the transient one.
  logic signed [GAIN_W-1:0] lut_a [2][N];
  logic signed [GAIN_W-1:0] lut_b [2][N];

  for (genvar k = 0; k < N; k++) begin : g_fill
    assign lut_a[0][k] = GAIN_W'(A_SS * (k - E_MAX));
    assign lut_a[1][k] = GAIN_W'(A_TR * (k - E_MAX));
    assign lut_b[0][k] = GAIN_W'(B_SS * (k - E_MAX));
    assign lut_b[1][k] = GAIN_W'(B_TR * (k - E_MAX));
  end

  logic [3:0] idx;
  always_comb begin
    // Errors outside the window cannot occur; clamp the index anyway.
    if (e > E_W'(E_MAX))       idx = 4'(N - 1);
    else if (e < -E_W'(E_MAX)) idx = '0;
    else                       idx = 4'(e + E_W'(E_MAX));
    ae = lut_a[mode][idx];
    be = lut_b[mode][idx];
  end
endmodule
