// tb_interference_sizes - power-line interference cancellation with 2, 3
// and 5 filter coefficients.
//
// The primary input is d(n) = 50 sin(pi n/2) + 10 m(n) + noise, where m(n)
// is Manchester-coded data and the noise is near-Gaussian with standard
// deviation 2; the filter input is the reference x(n) = sin(pi n/2 + pi/6)
// in the 1/128 format (sampling at four times the hum frequency). Three
// filters run side by side on the same samples: (a_0, b_1), (a_0, a_1, b_1)
// and (a_0..a_2, b_1, b_2). Each is checked sample by sample against the
// integer model, and each must have removed most of the hum by the end:
// the power of e(n) - data - noise over the last 256 samples must be below
// 1/20 of the hum power and below that of the first 256 samples.
module tb_interference_sizes;
  import ee_lms_ref_pkg::*;

  localparam int NSAMP = 6000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  int x = 0, d = 0, dn = 0;
  int checks = 0, failures = 0;

  ic_lane #(.NA(1), .NB(1), .NSAMP(NSAMP)) lane2 (.clk, .rst_n, .en, .x, .d, .dn);
  ic_lane #(.NA(2), .NB(1), .NSAMP(NSAMP)) lane3 (.clk, .rst_n, .en, .x, .d, .dn);
  ic_lane #(.NA(3), .NB(2), .NSAMP(NSAMP)) lane5 (.clk, .rst_n, .en, .x, .d, .dn);

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic judge(string name, int first, int last, int hum_pow);
    $display("%s: residual hum power first=%0d last=%0d (hum %0d)", name, first, last, hum_pow);
    checks += 2;
    if (last * 20 > hum_pow) begin failures++; $display("%s: hum not removed", name); end
    if (last >= first)       begin failures++; $display("%s: no improvement", name); end
  endtask

  initial begin
    bit bits [];
    int hum_pow = 0;
    bits = new[64];
    foreach (bits[k]) bits[k] = 1'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      int m, nz;
      m  = manchester(n, bits);
      nz = gauss_noise();
      x  = reference(n);
      dn = m + nz;
      d  = clamp(hum(n) + m + nz, -128, 127);
      en = 1'b1;
      if (n >= NSAMP - 256) hum_pow += hum(n) * hum(n);
      @(posedge clk);
      #2;
    end
    en = 1'b0;
    @(posedge clk);
    checks   += lane2.checks + lane3.checks + lane5.checks;
    failures += lane2.failures + lane3.failures + lane5.failures;
    $display("2 coefficients: a0=%0d b1=%0d", lane2.a_out[0], lane2.b_out[0]);
    $display("3 coefficients: a0=%0d a1=%0d b1=%0d", lane3.a_out[0], lane3.a_out[1], lane3.b_out[0]);
    $display("5 coefficients: a0=%0d a1=%0d a2=%0d b1=%0d b2=%0d", lane5.a_out[0], lane5.a_out[1],
             lane5.a_out[2], lane5.b_out[0], lane5.b_out[1]);
    judge("2 coefficients", lane2.res_first, lane2.res_last, hum_pow);
    judge("3 coefficients", lane3.res_first, lane3.res_last, hum_pow);
    judge("5 coefficients", lane5.res_first, lane5.res_last, hum_pow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
