// tb_ref_pkg: reference model of one multiply-accumulate step of the PE,
// written with plain integer arithmetic for the testbenches, plus a real-number
// decoder used to check results against the mathematical dot product.
//
// A partial sum is (-1)^s * m * 2^e with an acc_w-bit magnitude m. One step
// multiplies an activation and a weight word given in their formats, brings
// the product to acc_w bits with its leading one on top (dropping low bits),
// aligns the operand with the smaller exponent by a right shift saturated at
// acc_w, adds with signs, and shifts right by one on carry-out.
package tb_ref_pkg;
  import hybrid_pkg::*;

  typedef struct {
    bit              s;
    int              e;
    longint unsigned m;
  } ref_psum_t;

  // What happened inside one step, for cycle counting and coverage.
  typedef struct {
    int la, lb;       // active mantissa lengths
    int sh_p, sh_s;   // alignment shifts
    bit zero_prod;    // product was zero
    bit truncated;    // product had more than acc_w bits
    bit subnormal;    // an operand was a subnormal float
    bit carry;        // accumulator carried out and renormalized
    bit cancel;       // signs differed (magnitude subtraction)
    bit exact_zero;   // result magnitude was zero after a subtraction
  } ref_info_t;

  typedef struct {
    bit              s;
    int              ebiased;
    longint unsigned m;
    int              len;
    bit              sub;
  } fields_t;

  function automatic fields_t split(longint unsigned w, fmt_t f);
    fields_t r;
    int mb, eb;
    longint unsigned ef;
    mb = int'(f.man_bits); eb = int'(f.exp_bits);
    r.m  = w & ((64'd1 << mb) - 1);
    ef   = (w >> mb) & ((64'd1 << eb) - 1);
    r.s  = f.sign_en ? 1'((w >> (mb + eb)) & 1) : 1'b0;
    r.sub = 1'b0;
    if (eb == 0) begin
      r.ebiased = 0;
      r.len = mb;
    end else begin
      r.len = mb + 1;
      if (ef == 0) begin
        r.ebiased = 1;
        r.sub = (r.m != 0);
      end else begin
        r.ebiased = int'(ef);
        r.m = r.m + (64'd1 << mb);
      end
    end
    return r;
  endfunction

  function automatic int bias_of(fmt_t f);
    return (f.exp_bits == 0) ? 0 : (1 << (int'(f.exp_bits) - 1)) - 1;
  endfunction

  function automatic int frac_of(fmt_t f);
    return (f.exp_bits == 0) ? 0 : int'(f.man_bits);
  endfunction

  function automatic int bit_len(longint unsigned x);
    int n;
    n = 0;
    while (x != 0) begin
      x = x >> 1;
      n++;
    end
    return n;
  endfunction

  function automatic ref_psum_t mac_step(ref_psum_t ps, longint unsigned aw, longint unsigned ww,
                                         fmt_t fa, fmt_t fw, int acc_w, output ref_info_t info);
    fields_t a, b;
    longint unsigned p, mp, ms;
    longint r;
    int ex, bits, ep, d;
    bit sp;
    ref_psum_t o;
    a = split(aw, fa);
    b = split(ww, fw);
    info = '{default: 0};
    info.la = a.len; info.lb = b.len;
    info.subnormal = a.sub || b.sub;
    p  = a.m * b.m;
    sp = a.s ^ b.s;
    ex = a.ebiased + b.ebiased - (bias_of(fa) + bias_of(fw) + frac_of(fa) + frac_of(fw));
    bits = bit_len(p);
    info.zero_prod = (p == 0);
    info.truncated = (bits > acc_w);
    if (p == 0) begin
      mp = 0; ep = ex;
    end else if (bits >= acc_w) begin
      mp = p >> (bits - acc_w); ep = ex + bits - acc_w;
    end else begin
      mp = p << (acc_w - bits); ep = ex - (acc_w - bits);
    end
    // alignment
    ms = ps.m;
    o.e = ep;
    if (mp == 0) begin
      o.e = ps.e;
    end else if (ms != 0) begin
      d = ep - ps.e;
      if (d >= 0) begin
        o.e = ep;
        info.sh_s = (d > acc_w) ? acc_w : d;
        ms = (info.sh_s >= acc_w) ? 0 : ms >> info.sh_s;
      end else begin
        o.e = ps.e;
        info.sh_p = (-d > acc_w) ? acc_w : -d;
        mp = (info.sh_p >= acc_w) ? 0 : mp >> info.sh_p;
      end
    end
    // signed add
    r = (sp ? -longint'(mp) : longint'(mp)) + (ps.s ? -longint'(ms) : longint'(ms));
    info.cancel = (sp != ps.s);
    o.s = (r < 0);
    if (r < 0) r = -r;
    info.exact_zero = info.cancel && (r == 0) && (mp != 0 || ms != 0);
    if (r >= (64'sd1 << acc_w)) begin
      r = r >> 1;
      o.e = o.e + 1;
      info.carry = 1'b1;
    end
    o.m = longint'(r);
    return o;
  endfunction

  // Real value of an operand word (floats and integers of the PE formats).
  function automatic real word_value(longint unsigned w, fmt_t f);
    fields_t x;
    real v;
    x = split(w, f);
    v = real'(x.m) * (2.0 ** (x.ebiased - bias_of(f) - frac_of(f)));
    return x.s ? -v : v;
  endfunction

  function automatic real psum_value(bit s, int e, longint unsigned m);
    real v;
    v = real'(m) * (2.0 ** e);
    return s ? -v : v;
  endfunction
endpackage
