// fp16_ref_pkg: reference FP16 arithmetic for the testbenches, computed
// through double-precision reals and independent of the RTL.
//
// A sum or product of two FP16 numbers is exact in double precision, so the
// reference forms it exactly and rounds it once to FP16: round to nearest,
// ties to even, with the design's conventions (subnormals flushed to zero,
// judged on the exact value before rounding; overflow to infinity).
package fp16_ref_pkg;

  typedef logic [15:0] fp16_t;

  function automatic real to_real(fp16_t x);
    real m;
    int  e;
    if (x[14:10] == 5'd0) return 0.0;
    m = 1.0 + real'(x[9:0]) / 1024.0;
    e = int'(x[14:10]) - 15;
    m = m * (2.0 ** e);
    return x[15] ? -m : m;
  endfunction

  function automatic fp16_t from_real(real x);
    logic s;
    real  a, sc, fr;
    int   e;
    longint r;
    s = (x < 0.0);
    a = s ? -x : x;
    if (a == 0.0) return 16'h0000;
    e = 0;
    while (a >= 2.0 ** (e + 1)) e++;
    while (a < 2.0 ** e) e--;
    if (e < -14) return {s, 15'd0};
    sc = a / (2.0 ** e) * 1024.0;       // in [1024, 2048)
    r  = longint'($floor(sc));
    fr = sc - real'(r);
    if (fr > 0.5 || (fr == 0.5 && r[0])) r++;
    if (r == 2048) begin
      r = 1024;
      e++;
    end
    if (e > 15) return {s, 15'h7C00};
    return {s, 5'(e + 15), 10'(r - 1024)};
  endfunction

  function automatic fp16_t add(fp16_t a, fp16_t b);
    if (b[14:10] == 5'd0) return (a[14:10] == 5'd0) ? {a[15] & b[15], 15'd0} : a;
    if (a[14:10] == 5'd0) return b;
    return from_real(to_real(a) + to_real(b));
  endfunction

  function automatic fp16_t mul(fp16_t a, fp16_t b);
    logic s;
    s = a[15] ^ b[15];
    if (a[14:10] == 5'd0 || b[14:10] == 5'd0) return {s, 15'd0};
    return from_real(to_real(a) * to_real(b));
  endfunction

  function automatic fp16_t scale(fp16_t a, int s);
    if (a[14:10] == 5'd0) return {a[15], 15'd0};
    return from_real(to_real(a) / (2.0 ** s));
  endfunction

  // random normal FP16 value with exponent field in [emin, emax]
  function automatic fp16_t rand_fp16(int emin, int emax);
    int unsigned r;
    r = $urandom;
    return {r[0], 5'(emin + int'(r[15:8] % (emax - emin + 1))), r[25:16]};
  endfunction

endpackage
