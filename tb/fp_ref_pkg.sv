// fp_ref_pkg: reference arithmetic for the testbenches, single precision only.
//
// Values are converted to double precision reals, where the product of two
// single precision numbers is exact, and the result is rounded back to single
// precision (round to nearest even, results below the normal range flushed to
// zero, overflow to infinity). The approximate multipliers are modelled from
// their defining formulas on reals, independently of the bit-level RTL.
package fp_ref_pkg;

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic bit is_normal(logic [31:0] x);
    return x[30:23] != 8'h00 && x[30:23] != 8'hff;
  endfunction

  // fraction field as a real in [0,1)
  function automatic real frac_r(logic [31:0] x);
    return real'(x[22:0]) / pow2(23);
  endfunction

  // value of a normal number or zero (subnormals read as zero)
  function automatic real f2r(logic [31:0] x);
    real v;
    if (x[30:23] == 8'h00) return 0.0;
    v = (1.0 + frac_r(x)) * pow2(int'(x[30:23]) - 127);
    return x[31] ? -v : v;
  endfunction

  // round a real to single precision
  function automatic logic [31:0] r2f(real x);
    return r2x(x, 8, 23);
  endfunction

  // value of a normal number or zero in a format with ew exponent and fw
  // fraction bits, right-aligned in x
  function automatic real x2r(logic [31:0] x, int ew, int fw);
    int  e = int'((x >> fw) & ((32'd1 << ew) - 1));
    real v;
    if (e == 0) return 0.0;
    v = (1.0 + real'(x & ((32'd1 << fw) - 1)) / pow2(fw)) * pow2(e - ((1 << (ew - 1)) - 1));
    return x[ew + fw] ? -v : v;
  endfunction

  // round a real to a format with ew exponent and fw fraction bits
  function automatic logic [31:0] r2x(real x, int ew, int fw);
    logic s;
    real  ax, m, sc, fr;
    int   e, bias;
    longint ip;
    if (x == 0.0) return 32'h0;
    s  = (x < 0.0);
    ax = s ? -x : x;
    e  = 0;
    while (ax >= pow2(e + 1)) e++;
    while (ax < pow2(e)) e--;
    m  = ax / pow2(e);
    sc = m * pow2(fw);
    ip = longint'($floor(sc));
    fr = sc - real'(ip);
    if (fr > 0.5 || (fr == 0.5 && ip[0])) ip++;
    if (ip == (64'd1 << (fw + 1))) begin ip = 64'd1 << fw; e++; end
    bias = (1 << (ew - 1)) - 1;
    if (e + bias <= 0) return 32'(s) << (ew + fw);
    if (e + bias >= (1 << ew) - 1)
      return (32'(s) << (ew + fw)) | (((32'd1 << ew) - 1) << fw);
    return (32'(s) << (ew + fw)) | (32'(e + bias) << fw) | 32'(ip & ((64'd1 << fw) - 1));
  endfunction

  // reference exact product, special operands included
  function automatic logic [31:0] mul_ref(logic [31:0] a, logic [31:0] b);
    bit an = a[30:23] == 8'hff && a[22:0] != 0, bn = b[30:23] == 8'hff && b[22:0] != 0;
    bit ai = a[30:23] == 8'hff && a[22:0] == 0, bi = b[30:23] == 8'hff && b[22:0] == 0;
    bit az = a[30:23] == 8'h00, bz = b[30:23] == 8'h00;
    logic s = a[31] ^ b[31];
    if (an || bn || (ai && bz) || (bi && az)) return 32'h7fc00000;
    if (ai || bi) return {s, 8'hff, 23'h0};
    if (az || bz) return {s, 31'h0};
    return {s, 31'h0} | r2f(f2r({1'b0, a[30:0]}) * f2r({1'b0, b[30:0]}));
  endfunction

  // mantissa-addition model: (1+fa)(1+fb) ~ 1+fa+fb while fa+fb < 1, and
  // 2*(fa+fb) once the fraction sum carries into the exponent; the values are
  // exact in single precision
  function automatic real rmac_val(logic [31:0] a, logic [31:0] b);
    real fa = frac_r(a), fb = frac_r(b);
    real sc = pow2(int'(a[30:23]) + int'(b[30:23]) - 254);
    real v  = (fa + fb < 1.0) ? (1.0 + fa + fb) * sc : 2.0 * (fa + fb) * sc;
    return (a[31] ^ b[31]) ? -v : v;
  endfunction

  // reference tuner decision, from the real fraction sum
  function automatic int rmac_run(logic [31:0] a, logic [31:0] b);
    real c = frac_r(a) + frac_r(b);
    int  bitv[23];
    int  pat, run;
    if (c >= 1.0) c = c - 1.0;
    for (int i = 0; i < 23; i++) begin
      c = c * 2.0;
      if (c >= 1.0) begin bitv[i] = 1; c = c - 1.0; end
      else bitv[i] = 0;
    end
    if (a[22] && b[22])        pat = 0;
    else if (!a[22] && !b[22]) pat = 1;
    else                       pat = bitv[0];
    run = 0;
    while (run < 23 && bitv[run] == pat) run++;
    return run;
  endfunction

  // CFPU model. path: 0 mantissa discarding, 1 shift-and-add, 2 exact;
  // tried2: the second stage was tried.
  function automatic void cfpu_model(logic [31:0] a, logic [31:0] b, int n,
                                     bit two_stage, output int path,
                                     output bit tried2, output logic [31:0] y);
    real fa = frac_r(a), fb = frac_r(b);
    real keep = (fa <= fb) ? fb : fa;
    real disc = (fa <= fb) ? fa : fb;
    real mm, sh, sum, rest, lim;
    int  e = int'(a[30:23]) + int'(b[30:23]) - 127;
    int  k;
    logic s = a[31] ^ b[31];
    bit  normal = is_normal(a) && is_normal(b);
    lim = pow2(-n);
    tried2 = 0;
    if (normal && e >= 1 && e <= 254 && (n == 0 || disc < lim)) begin
      path = 0;
      y = {s, 31'h0} | r2f((1.0 + keep) * pow2(e - 127));
      return;
    end
    if (two_stage && normal) begin
      tried2 = 1;
      k = 0;
      if (disc > 0.0) begin
        k = 1;
        while (disc < pow2(-k)) k++;
      end
      rest = (k == 0) ? 0.0 : disc - pow2(-k);
      mm  = (1.0 + keep) * pow2(23);
      sh  = (k == 0) ? 0.0 : $floor(mm / pow2(k));
      sum = mm + sh;
      if (sum >= pow2(24)) begin sum = $floor(sum / 2.0); e++; end
      if (rest < lim && e >= 1 && e <= 254) begin
        path = 1;
        y = {s, 31'h0} | r2f(sum / pow2(23) * pow2(e - 127));
        return;
      end
    end
    path = 2;
    y = mul_ref(a, b);
  endfunction

  function automatic real rel_err(real approx, real exact);
    real d = approx - exact;
    if (d < 0) d = -d;
    if (exact == 0.0) return d;
    return exact > 0 ? d / exact : -d / exact;
  endfunction

  // random normal number with exponent field in [emin, emax]
  function automatic logic [31:0] rand_fp(int emin, int emax);
    int e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
