// tb_fp_ref_pkg: reference model of the inexact single-precision adder, for
// the testbenches only.
//
// The model is written with whole-word integer arithmetic (masks, + and -
// on plain integers) rather than with the bit-level structures of the RTL,
// so that a testbench compares two independent descriptions of the same
// arithmetic. It also converts singles to `real` so the exact
// configuration can be held against ordinary floating-point addition.
package tb_fp_ref_pkg;

  typedef struct {
    logic [31:0] z;
    logic        ovf, unf, zero, inv;
    // internal events, for coverage counting in the testbenches
    bit          carry_norm;   // addition carried out: right shift by one
    bit          left_norm;    // subtraction needed a left shift
    bit          swapped;      // B was larger
    bit          all_shifted;  // smaller significand aligned away entirely
  } ref_res_t;

  // a - b on `width`-bit unsigned exponents, the low k difference bits
  // replaced by a|b and the borrow into the exact part taken from bit k-1
  function automatic int unsigned ref_exp_sub(int unsigned a, int unsigned b,
                                              int unsigned k, int unsigned width);
    int unsigned lowmask, hi, lo, bw;
    if (k == 0) return (a - b) & ((1 << width) - 1);
    if (k > width) k = width;
    lowmask = (1 << k) - 1;
    lo = (a | b) & lowmask;
    bw = (((a >> (k - 1)) & 1) == 0 && ((b >> (k - 1)) & 1) == 1) ? 1 : 0;
    hi = ((a >> k) - (b >> k) - bw) << k;
    return (hi | lo) & ((1 << width) - 1);
  endfunction

  // lower-part-OR add of 24-bit significands; returns {cout, sum} (25 bits)
  function automatic longint unsigned ref_loa(longint unsigned a, longint unsigned b,
                                              bit sub, int unsigned n);
    longint unsigned m24, bx, lowmask, lo, hi, cin;
    m24 = 64'hFF_FFFF;
    bx  = sub ? (~b & m24) : b;
    if (n == 0) return a + bx + sub;
    if (n > 24) n = 24;
    lowmask = (64'd1 << n) - 1;
    lo  = (a | bx) & lowmask;
    cin = (a >> (n - 1)) & (bx >> (n - 1)) & 1;
    hi  = ((a >> n) + (bx >> n) + cin) << n;
    return hi | lo;
  endfunction

  // leading zeros of a 24-bit value, looking only at bits 23..l
  function automatic int unsigned ref_lzc(longint unsigned m, int unsigned l);
    if (l > 23) l = 23;
    for (int p = 23; p >= int'(l); p--)
      if (((m >> p) & 1) != 0) return 23 - p;
    return 24 - l;
  endfunction

  function automatic ref_res_t ref_add(logic [31:0] a, logic [31:0] b,
                                       int unsigned n_approx, int unsigned exp_k,
                                       int unsigned lzc_l);
    ref_res_t r;
    int unsigned ea, eb, el, es, d, lz;
    longint unsigned ma, mb, ml, ms, al, s, s24, mant;
    bit sa, sb, sl, sub, a_nan, b_nan, a_inf, b_inf, a_z, b_z;
    int e;
    r = '{default: 0};
    sa = a[31]; sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    a_z = (ea == 0); b_z = (eb == 0);
    a_inf = (ea == 255) && (a[22:0] == 0); a_nan = (ea == 255) && (a[22:0] != 0);
    b_inf = (eb == 255) && (b[22:0] == 0); b_nan = (eb == 255) && (b[22:0] != 0);
    ma = a_z ? 0 : (64'h80_0000 + a[22:0]);
    mb = b_z ? 0 : (64'h80_0000 + b[22:0]);

    // larger magnitude first
    r.swapped = (longint'(eb) * 64'h100_0000 + mb) > (longint'(ea) * 64'h100_0000 + ma);
    if (r.swapped) begin el = eb; es = ea; ml = mb; ms = ma; sl = sb; end
    else           begin el = ea; es = eb; ml = ma; ms = mb; sl = sa; end
    sub = sa ^ sb;
    d   = ref_exp_sub(el, es, exp_k, 8);
    r.all_shifted = (d >= 24) && (ms != 0);
    al  = (d >= 24) ? 0 : (ms >> d);
    s   = ref_loa(ml, al, sub, n_approx);
    s24 = s & 64'hFF_FFFF;

    if (!sub && (s >> 24) != 0) begin
      r.carry_norm = 1;
      mant = s >> 1;
      e = int'(el) + 1;
    end else begin
      lz = ref_lzc(s24, lzc_l);
      r.left_norm = sub && (lz != 0) && (s24 != 0);
      mant = (s24 << lz) & 64'hFF_FFFF;
      e = int'(el) - int'(lz);
    end

    if (a_nan || b_nan || (a_inf && b_inf && sa != sb)) begin
      r.z = 32'h7FC0_0000; r.inv = 1;
    end else if (a_inf) r.z = {sa, 8'hFF, 23'd0};
    else if (b_inf)     r.z = {sb, 8'hFF, 23'd0};
    else if (a_z && b_z) begin r.z = {sa & sb, 31'd0}; r.zero = 1; end
    else if (b_z)       r.z = {sa, a[30:23], a[22:0]};
    else if (a_z)       r.z = {sb, b[30:23], b[22:0]};
    else if (s24 == 0 && !(!sub && (s >> 24) != 0)) begin r.z = 0; r.zero = 1; end
    else if (e <= 0)    begin r.z = {sl, 31'd0}; r.unf = 1; r.zero = 1; end
    else if (e >= 255)  begin r.z = {sl, 8'hFF, 23'd0}; r.ovf = 1; end
    else                r.z = {sl, 8'(e), mant[22:0]};
    return r;
  endfunction

  // single (normal, zero or infinite) to real, via the double encoding
  function automatic real sp2real(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 0) return 0.0;
    if (x[30:23] == 8'hFF) d = {x[31], 11'h7FF, x[22:0], 29'd0};
    else d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // random normal single with exponent in [emin, emax]
  function automatic logic [31:0] rand_sp(int unsigned emin, int unsigned emax);
    logic [31:0] x;
    x[31]    = 1'($urandom);
    x[30:23] = 8'(emin + ($urandom % (emax - emin + 1)));
    x[22:0]  = 23'($urandom);
    return x;
  endfunction

endpackage
