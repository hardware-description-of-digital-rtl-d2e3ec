// lms_section - one FIR LMS filter of the Equation-Error structure.
//
// The Equation-Error adaptive IIR filter is two FIR LMS filters that share
// one error signal: one over the input x(n) (the a_i, numerator) and one over
// the delayed desired signal d(n-j) (the b_j, denominator). This module is
// one of them. Combinationally it forms acc = sum_k coef[k] * u[k] at full
// precision (scale 2^(2*FRAC)); the caller adds the two sections and rescales.
// On a clock with en high every coefficient takes the LMS step
//     coef[k] <= sat( coef[k] + round( err * u[k] / 2^(FRAC + MU_SHIFT) ) )
// i.e. w(n+1) = w(n) + mu e(n) u(n) with mu = 2^-MU_SHIFT and the 1/128 that
// the fractional format needs. The update uses the err and u present in the
// same cycle, so an update completes in one clock per sample.
//
// One multiplier per tap forms the filter product and one per tap forms the
// update product. The update rule and mu follow the published design; the
// round-half-up of the update term, the saturation of the coefficients and
// the reset to zero are this design's choices.
module lms_section #(
  parameter int unsigned TAPS     = 1,
  parameter int unsigned DW       = iir_pkg::DATA_W,
  parameter int unsigned CW       = iir_pkg::COEF_W,
  parameter int unsigned FRAC     = iir_pkg::FRAC_BITS,
  parameter int unsigned MU_SHIFT = iir_pkg::MU_SHIFT,
  parameter int unsigned AW       = DW + CW + $clog2(TAPS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] u    [TAPS],
  input  logic signed [DW-1:0] err,
  output logic signed [AW-1:0] acc,
  output logic signed [CW-1:0] coef [TAPS]
);
  localparam int unsigned SH = FRAC + MU_SHIFT;   // total right shift of e*u
  localparam int unsigned PW = 2 * DW + 1;        // e*u product plus rounding headroom
  localparam int unsigned NW = ((PW > CW) ? PW : CW) + 1;  // step and coefficient sum before saturation

  localparam logic signed [CW-1:0] CMAX = {1'b0, {(CW-1){1'b1}}};
  localparam logic signed [CW-1:0] CMIN = {1'b1, {(CW-1){1'b0}}};

  logic signed [CW-1:0] coef_q [TAPS];
  logic signed [CW-1:0] coef_d [TAPS];

  // Filter products, summed at full width.
  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) begin
      acc = acc + AW'(coef_q[k]) * AW'(u[k]);
    end
  end

  // LMS step for each coefficient, with saturation to CW bits.
  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      logic signed [PW-1:0] prod;
      logic signed [NW-1:0] step;
      logic signed [NW-1:0] nxt;
      prod = PW'(err) * PW'(u[k]) + PW'(1 << (SH - 1));
      step = NW'(prod >>> SH);
      nxt  = NW'(coef_q[k]) + step;
      if (nxt > NW'(CMAX))      coef_d[k] = CMAX;
      else if (nxt < NW'(CMIN)) coef_d[k] = CMIN;
      else                      coef_d[k] = nxt[CW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) coef_q[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < TAPS; k++) coef_q[k] <= coef_d[k];
    end
  end

  assign coef = coef_q;
endmodule
