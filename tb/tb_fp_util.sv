// Reference helpers shared by the floating-point testbenches: conversions between real
// numbers, IEEE single-precision bit patterns and the BSD formats, computed independently
// of the RTL (plain arithmetic on reals).
package tb_fp_util;
  import bsd_fp_pkg::*;

  function automatic real pow2(int n);
    real r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  // real -> IEEE single (mantissa truncated), zero for |r| < 2^-120
  function automatic logic [31:0] r2f(real r);
    logic s;
    int   e;
    real  m;
    logic [22:0] frac;
    s = (r < 0.0);
    m = s ? -r : r;
    if (m < pow2(-120)) return 32'd0;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    m = m - 1.0;
    frac = 23'(longint'(m * pow2(23) - 0.5 + 1.0e-12) );
    if (m * pow2(23) < 0.5) frac = 0;
    return {s, 8'(e + 127), frac};
  endfunction

  function automatic real f2r(logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = (1.0 + real'(f[22:0]) / pow2(23)) * pow2(int'(f[30:23]) - 127);
    return f[31] ? -m : m;
  endfunction

  function automatic real sd2r(logic [63:0] pos, logic [63:0] neg);
    real r = 0.0;
    for (int i = 63; i >= 0; i--) r = r * 2.0 + real'(int'(pos[i]) - int'(neg[i]));
    return r;
  endfunction

  function automatic real bsd2r(bsd_fp_t b);
    if (b.exp == EXP_ZERO) return 0.0;
    return sd2r(64'(b.pos), 64'(b.neg)) * pow2(int'(b.exp) - 23);
  endfunction

  function automatic real prod2r(bsd_prod_t p);
    if (p.exp == EXP_ZERO) return 0.0;
    return sd2r(64'(p.pos), 64'(p.neg)) * pow2(int'(p.exp) - 27);
  endfunction

  function automatic real booth2r(booth_fp_t w);
    real r = 0.0;
    for (int i = BOOTH_POS - 1; i >= 0; i--)
      r = r * 2.0 + (w.pos[i] ? (w.neg[i] ? -1.0 : 1.0) : 0.0);
    return r * pow2(int'(w.exp) - 23);
  endfunction

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // random real in +-[2^lo, 2^hi)
  function automatic real rnd_real(int lo, int hi);
    real m = 1.0 + real'($urandom % 32'h00800000) / pow2(23);
    int  e = lo + int'($urandom % 32'(hi - lo));
    real r = m * pow2(e);
    return ($urandom % 2) ? -r : r;
  endfunction
endpackage
