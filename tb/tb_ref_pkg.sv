// tb_ref_pkg: reference arithmetic for the testbenches.
//
// Golden-model helpers written from the specification of each block rather
// than from its RTL: real-valued coefficient design for the low-pass banks,
// floor-based fixed-point scaling, and saturation.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // floor(a * b / d) computed in real arithmetic
  function automatic longint scale_floor(input longint a, input longint b, input longint d);
    real r;
    r = real'(a) * real'(b) / real'(d);
    return longint'($floor(r));
  endfunction

  // Hamming-windowed sinc low-pass, bank b of nbanks, cutoff (b+1)/(2*nbanks) fs,
  // scaled to sum 128 and rounded half away from zero, clamped to 8 bits.
  function automatic int lp_coef(input int b, input int k, input int nbanks, input int ntaps);
    real h, s, fc, m, x, w;
    s  = 0.0;
    fc = real'(b + 1) / real'(2 * nbanks);
    h  = 0.0;
    for (int i = 0; i < ntaps; i++) begin
      real hi;
      m  = real'(i) - real'(ntaps - 1) / 2.0;
      x  = 2.0 * fc * m;
      w  = 0.54 - 0.46 * $cos(2.0 * PI * real'(i) / real'(ntaps - 1));
      hi = ((x == 0.0) ? 1.0 : $sin(PI * x) / (PI * x)) * 2.0 * fc * w;
      s  = s + hi;
      if (i == k) h = hi;
    end
    h = h * 128.0 / s;
    begin
      int q;
      q = (h >= 0.0) ? int'($floor(h + 0.5)) : -int'($floor(-h + 0.5));
      if (q > 127) q = 127;
      if (q < -128) q = -128;
      return q;
    end
  endfunction

endpackage
