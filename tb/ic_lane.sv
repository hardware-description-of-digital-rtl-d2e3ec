// ic_lane - one filter size in the interference-cancellation size sweep.
//
// Holds an ee_lms_iir with NA feed-forward and NB feedback coefficients and
// its integer reference model. On each rising clock with en high the caller
// has set x, d (and the data-plus-noise part dn of d); just before the edge
// the lane compares y and e with the model, and after the edge the
// coefficients. It accumulates the power of what is left of the hum,
// e(n) - dn(n), over the first and the last WIN samples.
module ic_lane #(
  parameter int NA = 1,
  parameter int NB = 1,
  parameter int NSAMP = 6000,
  parameter int WIN = 256
) (
  input logic clk,
  input logic rst_n,
  input logic en,
  input int   x,
  input int   d,
  input int   dn
);
  import ee_lms_ref_pkg::*;

  logic signed [7:0] y_out, e_out;
  logic signed [7:0] a_out [NA];
  logic signed [7:0] b_out [NB];
  logic sat_y, sat_e;

  int checks = 0, failures = 0, n = 0;
  int res_first = 0, res_last = 0;

  ee_lms_ref #(NA, NB) ref_m = new();

  ee_lms_iir #(.NA(NA), .NB(NB)) dut (
    .clk, .rst_n, .en, .x_in(8'(x)), .d_in(8'(d)), .y_out, .e_out, .a_out, .b_out, .sat_y, .sat_e
  );

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("NA=%0d NB=%0d sample %0d: %s got %0d expected %0d", NA, NB, n, what, got, exp);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && en) begin
      int r;
      ref_m.eval(x, d);
      expect_eq("y", int'(y_out), ref_m.y);
      expect_eq("e", int'(e_out), ref_m.e);
      r = int'(e_out) - dn;
      if (n < WIN) res_first += r * r;
      if (n >= NSAMP - WIN) res_last += r * r;
    end
  end

  always @(posedge clk) begin
    if (rst_n && en) begin
      ref_m.update();
      n++;
      #1;
      for (int i = 0; i < NA; i++) expect_eq("a", int'(a_out[i]), ref_m.a[i]);
      for (int j = 0; j < NB; j++) expect_eq("b", int'(b_out[j]), ref_m.b[j]);
    end
  end
endmodule
