// tb_vq_ref_pkg: reference arithmetic for the TSVQ encoder testbenches.
//
// Works directly from the two codevectors of a node rather than from the
// stored words: distortions are summed squared errors, the stored constant is
// K = sum(Ca^2 - Cb^2) rounded to the nearest multiple of 2^12 (half away
// from zero) and saturated to 9 bits, and the hardware's decision value is
// (D(X,Ca) - D(X,Cb)) - K + Kq*2^12. The index bit is 1 when that value is
// not negative.
package tb_vq_ref_pkg;

  typedef int unsigned pixv_t [16];

  function automatic int sqdist(input pixv_t x, input pixv_t c);
    int s = 0;
    for (int i = 0; i < 16; i++) s += (int'(x[i]) - int'(c[i])) * (int'(x[i]) - int'(c[i]));
    return s;
  endfunction

  function automatic int k_exact(input pixv_t ca, input pixv_t cb);
    int s = 0;
    for (int i = 0; i < 16; i++) s += int'(ca[i]) * int'(ca[i]) - int'(cb[i]) * int'(cb[i]);
    return s;
  endfunction

  function automatic int k_quant(input int k);
    int q;
    q = (k >= 0) ? (k + 2048) / 4096 : -((-k + 2048) / 4096);
    if (q > 255) q = 255;
    if (q < -256) q = -256;
    return q;
  endfunction

  function automatic int hw_value(input pixv_t x, input pixv_t ca, input pixv_t cb);
    int k = k_exact(ca, cb);
    return sqdist(x, ca) - sqdist(x, cb) - k + k_quant(k) * 4096;
  endfunction

  function automatic bit decide(input pixv_t x, input pixv_t ca, input pixv_t cb);
    return hw_value(x, ca, cb) >= 0;
  endfunction

endpackage
