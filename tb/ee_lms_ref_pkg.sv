// ee_lms_ref_pkg - integer reference model of the Equation-Error LMS filter,
// and the stimulus generators of the two application tests.
//
// ee_lms_ref models the filter sample by sample with plain int arithmetic:
//   y = floor((sum a_i x(n-i) + sum b_j d(n-j)) / 128), clamped to 8 bits
//   e = clamp(d(n) - floor(...))
//   w <- clamp(w + floor((e*u + 256) / 512))   (mu = 1/4, round half up)
// step() returns y and e for the present sample and, when en is set,
// applies the update and shifts the histories, as the hardware does at the
// clock edge. The generators give the interference-cancellation signals
// (50-amplitude hum at fs/4, Manchester-coded data of amplitude 10, small
// Gaussian noise, and the unit reference sinusoid with a pi/6 phase offset)
// and two sinusoids for inverse system identification.
package ee_lms_ref_pkg;

  function automatic int floor_div(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  function automatic int clamp(int v, int lo, int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  class ee_lms_ref #(int NA = 1, int NB = 1);
    int a [NA];
    int b [NB];
    int xh [NA];      // xh[i] = x(n-i); xh[0] filled by step()
    int dh [NB+1];    // dh[j] = d(n-j); dh[0] filled by step()
    int y, e;
    bit sat_y, sat_e;
    int n_coef_sat;

    function new();
      reset();
    endfunction

    function void reset();
      foreach (a[i]) a[i] = 0;
      foreach (b[j]) b[j] = 0;
      foreach (xh[i]) xh[i] = 0;
      foreach (dh[j]) dh[j] = 0;
      n_coef_sat = 0;
    endfunction

    // Outputs for inputs (x, d) with the present state.
    function void eval(int x, int d);
      int s, yf, ef;
      xh[0] = x;
      dh[0] = d;
      s = 0;
      for (int i = 0; i < NA; i++) s += a[i] * xh[i];
      for (int j = 1; j <= NB; j++) s += b[j-1] * dh[j];
      yf = floor_div(s, 128);
      ef = d - yf;
      y = clamp(yf, -128, 127);
      e = clamp(ef, -128, 127);
      sat_y = (y != yf);
      sat_e = (e != ef);
    endfunction

    // Clock edge with en high.
    function void update();
      for (int i = 0; i < NA; i++) begin
        int w = a[i] + floor_div(e * xh[i] + 256, 512);
        if (w != clamp(w, -128, 127)) n_coef_sat++;
        a[i] = clamp(w, -128, 127);
      end
      for (int j = 1; j <= NB; j++) begin
        int w = b[j-1] + floor_div(e * dh[j] + 256, 512);
        if (w != clamp(w, -128, 127)) n_coef_sat++;
        b[j-1] = clamp(w, -128, 127);
      end
      for (int i = NA - 1; i > 0; i--) xh[i] = xh[i-1];
      for (int j = NB; j > 0; j--) dh[j] = dh[j-1];
    endfunction
  endclass

  // Interference cancellation: d(n) = 50 sin(pi n/2) + 10 m(n) + noise,
  // x(n) = sin(pi n/2 + pi/6) in the 1/128 format.
  function automatic int hum(int n);
    return int'($rtoi($floor(50.0 * $sin(3.14159265358979 * n / 2.0) + 0.5)));
  endfunction

  function automatic int reference(int n);
    return clamp(int'($rtoi($floor(127.0 * $sin(3.14159265358979 * n / 2.0 + 3.14159265358979 / 6.0) + 0.5))), -128, 127);
  endfunction

  // Manchester code: each data bit spans 8 samples, first half the bit,
  // second half its complement; bits is a pseudo-random word sequence.
  function automatic int manchester(int n, bit bits []);
    bit b = bits[(n / 8) % bits.size()];
    bit level = ((n % 8) < 4) ? b : !b;
    return level ? 10 : -10;
  endfunction

  // Approximately Gaussian noise with standard deviation 2 (sum of 12
  // uniforms), rounded.
  function automatic int gauss_noise();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return int'($rtoi($floor(2.0 * (s - 6.0) + 0.5)));
  endfunction

  // Inverse identification source at a quarter of the sample rate:
  // 114 sin(pi n/2 + pi/6), which after the plant 1 - 0.5 z^-1 gives an
  // input x(n) of amplitude about 128.
  function automatic int inv_source_q(int n);
    return int'($rtoi($floor(114.0 * $sin(3.14159265358979 * n / 2.0 + 3.14159265358979 / 6.0) + 0.5)));
  endfunction

  // Inverse identification source: sinusoid of amplitude 100, period 16.
  function automatic int inv_source(int n);
    return int'($rtoi($floor(100.0 * $sin(2.0 * 3.14159265358979 * n / 16.0) + 0.5)));
  endfunction

endpackage
