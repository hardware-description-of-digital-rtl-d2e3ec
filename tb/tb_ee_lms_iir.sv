// tb_ee_lms_iir - end-to-end test of the adaptive IIR filter at its default
// size (two coefficients, a_0 and b_1, 8-bit data).
//
// The DUT runs with no parameter overrides. Every cycle its y, e, saturation
// flags and coefficients are compared with the integer model in
// ee_lms_ref_pkg, which is written independently of the RTL. Three phases:
//   1. random samples with a random sample strobe, including full-scale
//      values, to exercise coefficient/output saturation and held cycles;
//   2. inverse system identification: a sinusoid d(n) passes through the
//      plant H(z) = 1 - 0.5 z^-1 to give x(n); after adaptation the filter
//      must model 1/H(z): e(n) near zero, a_0 near 1 (127 is full scale)
//      and b_1 near 0.5 (64); run twice, with a period-16 sinusoid and
//      with one at a quarter of the sample rate;
//   3. interference cancellation: d(n) = hum + Manchester data + noise,
//      x(n) = reference sinusoid; after adaptation e(n) must follow the
//      data, with the hum largely removed.
// A new sample is accepted every clock (en high) in phases 2 and 3, the
// one-sample-per-clock rate; outputs are checked in the same cycle the
// sample is presented and coefficients one clock later. The test counts
// each mechanism (update, held sample, coefficient saturation, y and e
// saturation, reset) and fails if one never happened.
module tb_ee_lms_iir;
  import ee_lms_ref_pkg::*;

  localparam int NA = 1, NB = 1;
  localparam int N_RAND = 3000, N_INV = 6000, N_IC = 6000;

  logic clk = 1'b0;
  logic rst_n, en;
  logic signed [7:0] x_in, d_in, y_out, e_out;
  logic signed [7:0] a_out [NA];
  logic signed [7:0] b_out [NB];
  logic sat_y, sat_e;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_update = 0, n_hold = 0, n_csat = 0, n_ysat = 0, n_esat = 0, n_reset = 0;

  ee_lms_ref #(NA, NB) ref_m = new();

  ee_lms_iir dut (.clk, .rst_n, .en, .x_in, .d_in, .y_out, .e_out, .a_out, .b_out, .sat_y, .sat_e);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (N_RAND + 2 * N_INV + N_IC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("cycle %0d: %s got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  task automatic compare_state();
    for (int i = 0; i < NA; i++) expect_eq("a", int'(a_out[i]), ref_m.a[i]);
    for (int j = 0; j < NB; j++) expect_eq("b", int'(b_out[j]), ref_m.b[j]);
  endtask

  // Present one sample, check the combinational outputs, clock it in.
  task automatic sample(int x, int d, bit strobe);
    x_in = 8'(x); d_in = 8'(d); en = strobe;
    ref_m.eval(x, d);
    #1;
    expect_eq("y", int'(y_out), ref_m.y);
    expect_eq("e", int'(e_out), ref_m.e);
    expect_eq("sat_y", int'(sat_y), int'(ref_m.sat_y));
    expect_eq("sat_e", int'(sat_e), int'(ref_m.sat_e));
    if (sat_y) n_ysat++;
    if (sat_e) n_esat++;
    @(posedge clk);
    if (strobe) begin ref_m.update(); n_update++; end
    else n_hold++;
    #1 compare_state();
  endtask

  task automatic do_reset();
    rst_n = 1'b0; en = 1'b0; x_in = '0; d_in = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    ref_m.reset();
    n_reset++;
    compare_state();
  endtask

  initial begin
    int start_cyc, dprev, abs_sum, res_first, res_last, hum_pow;
    int dlast = 0;
    bit st;
    bit bits [];

    // ---- phase 1: random ----
    do_reset();
    for (int n = 0; n < N_RAND; n++) begin
      int x, d;
      if ((n / 500) % 3 == 0) begin x = $urandom_range(0, 255) - 128; d = $urandom_range(0, 255) - 128; end
      else if ((n / 500) % 3 == 1) begin
        // gain of two: ideal a_0 = 2, beyond the coefficient range
        x = $urandom_range(0, 120) - 60;
        d = 2 * x;
      end else begin
        // integrator d(n) = x(n) + d(n-1): ideal a_0 = b_1 = 1, beyond full scale
        x = $urandom_range(0, 255) - 128;
        d = clamp(x + dlast, -128, 127);
      end
      st = ($urandom_range(0, 4) != 0);
      sample(x, d, st);
      if (st) dlast = d;
    end
    n_csat = ref_m.n_coef_sat;

    // ---- phase 2: inverse system identification ----
    do_reset();
    dprev = 0;
    start_cyc = cyc;
    abs_sum = 0;
    for (int n = 0; n < N_INV; n++) begin
      int d, x;
      d = inv_source(n);
      x = clamp(d - floor_div(dprev, 2), -128, 127);   // plant H(z) = 1 - 0.5 z^-1
      sample(x, d, 1'b1);
      if (n >= N_INV - 256) abs_sum += (ref_m.e < 0) ? -ref_m.e : ref_m.e;
      dprev = d;
    end
    expect_eq("inverse id: one sample per clock", cyc - start_cyc, N_INV);
    $display("inverse id: a0=%0d b1=%0d mean|e| x256=%0d", a_out[0], b_out[0], abs_sum);
    checks++;
    if (abs_sum > 256 * 4) begin failures++; $display("inverse id: residual error too large"); end
    checks++;
    if (a_out[0] < 100) begin failures++; $display("inverse id: a0 not near 1"); end
    checks++;
    if (b_out[0] < 48 || b_out[0] > 84) begin failures++; $display("inverse id: b1 not near 0.5"); end

    // ---- phase 2b: inverse identification with a sinusoid at fs/4 ----
    do_reset();
    dprev = 0;
    abs_sum = 0;
    for (int n = 0; n < N_INV; n++) begin
      int d, x;
      d = inv_source_q(n);
      x = clamp(d - floor_div(dprev, 2), -128, 127);
      sample(x, d, 1'b1);
      if (n >= N_INV - 256) abs_sum += (ref_m.e < 0) ? -ref_m.e : ref_m.e;
      dprev = d;
    end
    $display("inverse id (fs/4): a0=%0d b1=%0d mean|e| x256=%0d", a_out[0], b_out[0], abs_sum);
    checks += 3;
    if (abs_sum > 256 * 4) begin failures++; $display("inverse id (fs/4): residual error too large"); end
    if (a_out[0] < 115) begin failures++; $display("inverse id (fs/4): a0 not near 1"); end
    if (b_out[0] < 52 || b_out[0] > 72) begin failures++; $display("inverse id (fs/4): b1 not near 0.5"); end

    // ---- phase 3: interference cancellation ----
    do_reset();
    bits = new[64];
    foreach (bits[k]) bits[k] = 1'($urandom);
    res_first = 0; res_last = 0; hum_pow = 0;
    for (int n = 0; n < N_IC; n++) begin
      int m, nz, d, r;
      m  = manchester(n, bits);
      nz = gauss_noise();
      d  = clamp(hum(n) + m + nz, -128, 127);
      sample(reference(n), d, 1'b1);
      r = ref_m.e - m - nz;                 // what is left of the hum
      if (n < 256) res_first += r * r;
      if (n >= N_IC - 256) begin res_last += r * r; hum_pow += hum(n) * hum(n); end
    end
    $display("interference: a0=%0d b1=%0d residual power first=%0d last=%0d hum=%0d (sum of 256)",
             a_out[0], b_out[0], res_first, res_last, hum_pow);
    checks++;
    if (res_last * 20 > hum_pow) begin failures++; $display("interference: hum not removed"); end

    // ---- mechanisms ----
    $display("mechanisms: updates=%0d held=%0d coef_sat=%0d y_sat=%0d e_sat=%0d resets=%0d",
             n_update, n_hold, n_csat, n_ysat, n_esat, n_reset);
    checks += 6;
    if (n_update == 0) begin failures++; $display("no coefficient update seen"); end
    if (n_hold == 0)   begin failures++; $display("no held sample seen"); end
    if (n_csat == 0)   begin failures++; $display("no coefficient saturation seen"); end
    if (n_ysat == 0)   begin failures++; $display("no y saturation seen"); end
    if (n_esat == 0)   begin failures++; $display("no e saturation seen"); end
    if (n_reset < 2)   begin failures++; $display("no mid-run reset seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
