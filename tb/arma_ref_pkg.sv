// arma_ref_pkg: reference model of the fixed-point ARMA control loop, for
// testbenches. It advances the loop one sample at a time with plain integer
// arithmetic: each Q2.6 product is divided by 64 and rounded toward minus
// infinity, the sum is kept, its low byte is reinterpreted as a signed
// sample, and the error against setpoint*8 is wrapped to a signed byte.
package arma_ref_pkg;

  typedef struct {
    int a1, a3, a4, b2, b3;     // coefficient integers (value x 64)
    int e1, e2, e3;             // e(k-1), e(k-2), e(k-3)
    int c1, c2;                 // c(k-1), c(k-2)
    int c16, c8, e8;            // results of the last sample
  } ref_state_t;

  // Signed byte from any integer, keeping the low 8 bits.
  function automatic int wrap8(int v);
    int m;
    m = v & 255;
    return (m >= 128) ? m - 256 : m;
  endfunction

  // Floor division by 2**6.
  function automatic int fdiv64(int v);
    if (v >= 0) return v / 64;
    return -((-v + 63) / 64);
  endfunction

  function automatic void ref_reset(ref ref_state_t s);
    s.e1 = 0; s.e2 = 0; s.e3 = 0; s.c1 = 0; s.c2 = 0;
    s.c16 = 0; s.c8 = 0; s.e8 = 0;
  endfunction

  // One sample with setpoint r (-16..15).
  function automatic void ref_step(ref ref_state_t s, input int r);
    int sum;
    sum = fdiv64(s.a1 * s.e1) + fdiv64(s.a3 * s.e2) + fdiv64(s.a4 * s.e3)
        + fdiv64(s.b2 * s.c1) + fdiv64(s.b3 * s.c2);
    s.c16 = sum;
    s.c8  = wrap8(sum);
    s.e8  = wrap8(wrap8(r * 8) - s.c8);
    s.e3 = s.e2; s.e2 = s.e1; s.e1 = s.e8;
    s.c2 = s.c1; s.c1 = s.c8;
  endfunction

endpackage
