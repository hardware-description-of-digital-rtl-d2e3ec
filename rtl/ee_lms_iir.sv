// ee_lms_iir - adaptive direct-form IIR filter, Equation-Error LMS (top).
//
// The filter models d(n) from the input x(n) and the past of d itself:
//     y(n) = sum_{i=0}^{NA-1} a_i x(n-i) + sum_{j=1}^{NB} b_j d(n-j)
//     e(n) = d(n) - y(n)
// and adapts every coefficient by w(n+1) = w(n) + mu e(n) u(n), where u is
// the sample the coefficient multiplies. Because the feedback taps are taken
// from the desired signal d and not from the filter's own output, the filter
// is not recursive while it adapts: it is two FIR LMS filters (lms_section)
// sharing one error, with a unimodal error surface and no stability problem.
// Once converged, a_i and b_j are read as the transfer function
//     G(z) = (sum a_i z^-i) / (1 - sum b_j z^-j).
// Default: two coefficients, a_0 and b_1, the configuration used in both
// published applications (interference cancellation, inverse system
// identification); NA/NB give the 3- and 5-coefficient variants.
//
// Interface and timing: one sample per clock at most. Present x_in and d_in
// and raise en; y_out and e_out are valid combinationally in the same cycle,
// computed with the coefficients and delayed samples held before the edge.
// At that clock edge the coefficients take their LMS step and the delay
// lines shift. With en low nothing changes. Synchronous active-low reset
// clears coefficients and delay lines. Data and coefficients are DW/CW-bit
// signed numbers scaled by 2^FRAC (128); mu = 2^-MU_SHIFT (0.25).
//
// Structure, update rule, mu and the scaling by 128 follow the published
// design. Word lengths (8 bits, read from its register counts), rounding,
// saturation, reset and the enable strobe are this design's choices.
module ee_lms_iir #(
  parameter int unsigned NA       = 1,   // feed-forward coefficients a_0..a_{NA-1}
  parameter int unsigned NB       = 1,   // feedback coefficients b_1..b_NB
  parameter int unsigned DW       = iir_pkg::DATA_W,
  parameter int unsigned CW       = iir_pkg::COEF_W,
  parameter int unsigned FRAC     = iir_pkg::FRAC_BITS,
  parameter int unsigned MU_SHIFT = iir_pkg::MU_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] d_in,
  output logic signed [DW-1:0] y_out,
  output logic signed [DW-1:0] e_out,
  output logic signed [CW-1:0] a_out [NA],
  output logic signed [CW-1:0] b_out [NB],
  output logic                 sat_y,
  output logic                 sat_e
);
  localparam int unsigned NMAX = (NA > NB) ? NA : NB;
  localparam int unsigned AW   = DW + CW + $clog2(NMAX + 1);

  logic signed [DW-1:0] x_taps [NA];
  logic signed [DW-1:0] d_taps [NB+1];
  logic signed [DW-1:0] d_past [NB];
  logic signed [AW-1:0] acc_ff, acc_fb;
  logic signed [DW-1:0] err;

  // x(n) .. x(n-NA+1)
  tap_delay_line #(.W(DW), .TAPS(NA)) u_x_dly (
    .clk, .rst_n, .en, .din(x_in), .taps(x_taps)
  );

  // d(n) .. d(n-NB); only d(n-1) .. d(n-NB) feed the filter
  tap_delay_line #(.W(DW), .TAPS(NB + 1)) u_d_dly (
    .clk, .rst_n, .en, .din(d_in), .taps(d_taps)
  );

  for (genvar j = 0; j < NB; j++) begin : g_dpast
    assign d_past[j] = d_taps[j+1];
  end

  // Numerator (feed-forward) LMS filter on x
  lms_section #(.TAPS(NA), .DW(DW), .CW(CW), .FRAC(FRAC), .MU_SHIFT(MU_SHIFT), .AW(AW)) u_ff (
    .clk, .rst_n, .en, .u(x_taps), .err, .acc(acc_ff), .coef(a_out)
  );

  // Denominator (feedback) LMS filter on past d
  lms_section #(.TAPS(NB), .DW(DW), .CW(CW), .FRAC(FRAC), .MU_SHIFT(MU_SHIFT), .AW(AW)) u_fb (
    .clk, .rst_n, .en, .u(d_past), .err, .acc(acc_fb), .coef(b_out)
  );

  error_unit #(.DW(DW), .AW(AW), .FRAC(FRAC)) u_err (
    .acc_ff, .acc_fb, .d(d_in), .y(y_out), .e(err), .sat_y, .sat_e
  );

  assign e_out = err;
endmodule
