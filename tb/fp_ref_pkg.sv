// fp_ref_pkg: reference model of the DSP's two float formats, written with
// the simulator's double precision reals and independent of the RTL. Used by
// the testbenches to compute expected results: a value is converted to real,
// the operation is done in real arithmetic, and the result is rounded back to
// nearest (ties away from zero) with the same saturation and flush rules as
// the hardware.
package fp_ref_pkg;

  function automatic real pow2(int n);
    real r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real r2real(logic [22:0] f);
    int e = $signed(f[21:16]);
    real v;
    if (e == -32) return 0.0;
    v = pow2(e - 11) * (1.0 + real'(f[15:0]) / 65536.0);
    return f[22] ? -v : v;
  endfunction

  function automatic real m2real(logic [15:0] f);
    int e = $signed(f[14:10]);
    real v;
    if (e == -16) return 0.0;
    v = pow2(e - 11) * (1.0 + real'(f[9:0]) / 1024.0);
    return f[15] ? -v : v;
  endfunction

  // round a real to a float with mbits mantissa bits and exponent range
  // [-emax, emax]; -emax-1 is the zero code
  function automatic logic [31:0] real2f(real x, int mbits, int emax);
    logic s = (x < 0.0);
    real a = s ? -x : x;
    int e;
    real frac, q;
    longint m;
    if (a == 0.0) return {1'b0, 8'(-emax - 1), 23'd0};
    e = -200;
    while (pow2(e + 1 - 11) <= a) e++;
    while (pow2(e - 11) > a) e--;
    frac = a / pow2(e - 11);
    q = (frac - 1.0) * pow2(mbits);
    m = longint'($floor(q + 0.5));
    if (m == (longint'(1) << mbits)) begin m = 0; e++; end
    if (e > emax) return {s, 8'(emax), 23'((longint'(1) << mbits) - 1)};
    if (e < -emax) return {1'b0, 8'(-emax - 1), 23'd0};
    return {s, 8'(e), 23'(m)};
  endfunction

  function automatic logic [22:0] real2r(real x);
    logic [31:0] t = real2f(x, 16, 31);
    return {t[31], t[28:23], t[15:0]};
  endfunction

  function automatic logic [15:0] real2m(real x);
    logic [31:0] t = real2f(x, 10, 15);
    return {t[31], t[27:23], t[9:0]};
  endfunction

  function automatic logic [15:0] real2int(real x);
    real a = (x < 0.0) ? -x : x;
    longint m = longint'($floor(a + 0.5));
    if (x < 0.0) m = -m;
    if (m > 32767) m = 32767;
    if (m < -32768) m = -32768;
    return 16'(m);
  endfunction

  // random register float, exponent within [elo, ehi]
  function automatic logic [22:0] rnd_r(int elo, int ehi);
    int e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 6'(e), 16'($urandom)};
  endfunction

endpackage
