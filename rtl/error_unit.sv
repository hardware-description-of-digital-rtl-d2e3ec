// error_unit - the adder block of the Equation-Error filter.
//
// Adds the feed-forward partial sum (a_i * x(n-i)) and the feedback partial
// sum (b_j * d(n-j)), removes the FRAC fraction bits that the product of two
// fractional numbers carries (arithmetic right shift, i.e. truncation toward
// minus infinity) to give y(n), and forms the equation error
// e(n) = d(n) - y(n). Both results are saturated to DW bits; sat_y and sat_e
// flag a clipped value. Purely combinational. Forming y and e from the two
// sums is the published structure; the truncating shift and the saturation
// are this design's choices.
module error_unit #(
  parameter int unsigned DW   = iir_pkg::DATA_W,
  parameter int unsigned AW   = 18,
  parameter int unsigned FRAC = iir_pkg::FRAC_BITS
) (
  input  logic signed [AW-1:0] acc_ff,
  input  logic signed [AW-1:0] acc_fb,
  input  logic signed [DW-1:0] d,
  output logic signed [DW-1:0] y,
  output logic signed [DW-1:0] e,
  output logic                 sat_y,
  output logic                 sat_e
);
  localparam int unsigned SW = AW + 2;   // sum of two AW-bit values, and d - y
  localparam logic signed [SW-1:0] DMAX = SW'({1'b0, {(DW-1){1'b1}}});
  localparam logic signed [SW-1:0] DMIN = -DMAX - SW'(1);

  logic signed [SW-1:0] sum, y_full, e_full;

  always_comb begin
    sum    = SW'(acc_ff) + SW'(acc_fb);
    y_full = sum >>> FRAC;
    e_full = SW'(d) - y_full;

    sat_y = (y_full > DMAX) || (y_full < DMIN);
    if (y_full > DMAX)      y = DMAX[DW-1:0];
    else if (y_full < DMIN) y = DMIN[DW-1:0];
    else                    y = y_full[DW-1:0];

    sat_e = (e_full > DMAX) || (e_full < DMIN);
    if (e_full > DMAX)      e = DMAX[DW-1:0];
    else if (e_full < DMIN) e = DMIN[DW-1:0];
    else                    e = e_full[DW-1:0];
  end
endmodule
