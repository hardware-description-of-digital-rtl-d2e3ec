// tb_error_unit - self-checking test of the adder/error block.
//
// Applies random partial sums (small ones, near the saturation edges and
// full-range ones) and random d. The expected y = clamp(floor((ff+fb)/128))
// and e = clamp(d - floor((ff+fb)/128)) are computed here with integer
// arithmetic, as are the two saturation flags. Counts how often each
// saturation was seen and fails if one never was.
module tb_error_unit;
  localparam int DW = 8, AW = 18;

  logic signed [AW-1:0] acc_ff, acc_fb;
  logic signed [DW-1:0] d, y, e;
  logic sat_y, sat_e;

  int checks = 0, failures = 0;
  int n_saty = 0, n_sate = 0;

  error_unit #(.DW(DW), .AW(AW), .FRAC(7)) dut (.acc_ff, .acc_fb, .d, .y, .e, .sat_y, .sat_e);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_div(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  function automatic int clamp8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int ff, fb, yf, ef;
      case (n % 3)
        0: begin ff = $urandom_range(0, 20000) - 10000; fb = $urandom_range(0, 20000) - 10000; end
        1: begin ff = $urandom_range(0, 40000) - 20000; fb = $urandom_range(0, 4000) - 2000; end
        default: begin ff = $urandom_range(0, 200000) - 100000; fb = $urandom_range(0, 200000) - 100000; end
      endcase
      acc_ff = AW'(ff); acc_fb = AW'(fb);
      d = DW'($urandom);
      #1;
      yf = floor_div(ff + fb, 128);
      ef = int'(d) - yf;
      checks += 4;
      if (int'(y) != clamp8(yf)) begin failures++; if (failures < 10) $display("y: got %0d exp %0d", y, clamp8(yf)); end
      if (int'(e) != clamp8(ef)) begin failures++; if (failures < 10) $display("e: got %0d exp %0d", e, clamp8(ef)); end
      if (sat_y != (yf != clamp8(yf))) begin failures++; if (failures < 10) $display("sat_y wrong"); end
      if (sat_e != (ef != clamp8(ef))) begin failures++; if (failures < 10) $display("sat_e wrong"); end
      if (sat_y) n_saty++;
      if (sat_e) n_sate++;
    end
    checks++;
    if (n_saty == 0 || n_sate == 0) begin failures++; $display("saturation never seen"); end
    $display("saturations: y=%0d e=%0d", n_saty, n_sate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
