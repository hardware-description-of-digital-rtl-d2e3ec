// tb_lms_section - self-checking test of one FIR LMS section.
//
// A 3-tap section is driven with random taps, errors and enable strobes.
// An integer model kept here computes the filter sum and the LMS update
//     w <- clamp(w + floor((e*u + 256) / 512), -128, 127)
// (mu = 1/4, scaling 1/128, round half up). Every cycle acc and the
// coefficients are compared with the model. Large errors are used often
// enough to drive coefficients into both saturation limits, and the test
// counts how often each limit was hit.
module tb_lms_section;
  localparam int TAPS = 3;
  localparam int DW = 8, CW = 8, AW = 18;

  logic clk = 1'b0;
  logic rst_n, en;
  logic signed [DW-1:0] u [TAPS];
  logic signed [DW-1:0] err;
  logic signed [AW-1:0] acc;
  logic signed [CW-1:0] coef [TAPS];

  int checks = 0, failures = 0;
  int w [TAPS];
  int hit_max = 0, hit_min = 0, updates = 0;

  lms_section #(.TAPS(TAPS), .DW(DW), .CW(CW), .FRAC(7), .MU_SHIFT(2), .AW(AW)) dut (
    .clk, .rst_n, .en, .u, .err, .acc, .coef
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_div(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  task automatic compare();
    int s = 0;
    for (int k = 0; k < TAPS; k++) s += w[k] * int'(u[k]);
    checks++;
    if (int'(acc) != s) begin
      failures++;
      if (failures < 10) $display("acc mismatch: got %0d expected %0d", acc, s);
    end
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (int'(coef[k]) != w[k]) begin
        failures++;
        if (failures < 10) $display("coef[%0d] mismatch: got %0d expected %0d", k, coef[k], w[k]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; err = '0;
    for (int k = 0; k < TAPS; k++) begin u[k] = '0; w[k] = 0; end
    @(posedge clk); #1 rst_n = 1'b1;
    compare();
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < TAPS; k++) u[k] = DW'($urandom);
      // phases: drive positive, then negative, then random errors
      if (n % 1000 < 250)      err = DW'($urandom_range(60, 127));
      else if (n % 1000 < 500) err = -DW'($urandom_range(60, 128));
      else                     err = DW'($urandom);
      if (n % 1000 < 500) for (int k = 0; k < TAPS; k++) u[k] = DW'($urandom_range(40, 127));
      en = ($urandom_range(0, 7) != 0);
      #1 compare();
      @(posedge clk);
      if (en) begin
        updates++;
        for (int k = 0; k < TAPS; k++) begin
          int nw;
          nw = w[k] + floor_div(int'(err) * int'(u[k]) + 256, 512);
          if (nw > 127) begin nw = 127; hit_max++; end
          if (nw < -128) begin nw = -128; hit_min++; end
          w[k] = nw;
        end
      end
      #1 compare();
    end
    checks++;
    if (hit_max == 0 || hit_min == 0) begin
      failures++;
      $display("saturation not exercised: max %0d min %0d", hit_max, hit_min);
    end
    $display("updates=%0d saturations: max=%0d min=%0d", updates, hit_max, hit_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
