// fp_ref_pkg: reference model of the FPU's arithmetic for the testbenches.
//
// Values are computed exactly as wide integers and rounded once, which is a
// different method from the hardware's aligned fixed-width datapaths. A finite
// binary32 value m * 2^(e-150) (m the 24-bit significand, e the biased exponent)
// is held as the integer m << (e + 150), i.e. scaled by 2^300; a product of two
// such values is m_a * m_b << (e_a + e_b). 600 bits hold every exact sum of a
// product and an addend. The rules modelled are those of the FPU: denormal
// operands read as zero, results below the normal range become a signed zero
// with underflow and inexact, overflow gives infinity under RNE and the largest
// finite value under truncation, a NaN operand is returned quietened.
package fp_ref_pkg;

  typedef logic [599:0] big_t;

  typedef struct packed {
    logic [31:0] val;
    logic [4:0]  flags;   // nv dz of uf nx
  } ref_res_t;

  localparam logic [31:0] R_QNAN = 32'h7FC0_0000;

  function automatic logic is_nan(logic [31:0] x);  return x[30:23] == 8'hFF && x[22:0] != 0; endfunction
  function automatic logic is_snan(logic [31:0] x); return is_nan(x) && !x[22]; endfunction
  function automatic logic is_inf(logic [31:0] x);  return x[30:23] == 8'hFF && x[22:0] == 0; endfunction
  function automatic logic is_zero(logic [31:0] x); return x[30:23] == 8'h00; endfunction
  function automatic logic [31:0] q(logic [31:0] x); return x | 32'h0040_0000; endfunction

  // Exact magnitude of a finite operand, scaled by 2^300.
  function automatic big_t mag(logic [31:0] x);
    big_t m;
    if (is_zero(x)) return '0;
    m = big_t'({1'b1, x[22:0]});
    return m << (int'(x[30:23]) + 150);
  endfunction

  // Exact product of two finite nonzero operands, scaled by 2^300.
  function automatic big_t prod(logic [31:0] a, logic [31:0] b);
    big_t m;
    m = big_t'({1'b1, a[22:0]}) * big_t'({1'b1, b[22:0]});
    return m << (int'(a[30:23]) + int'(b[30:23]));
  endfunction

  // Round an exact value sign * m * 2^-300 to binary32.
  function automatic ref_res_t round_big(logic sign, big_t m, logic rne);
    ref_res_t r;
    int       p, e;
    big_t     kept, rest, half;
    logic     g, s;
    r = '0;
    if (m == '0) begin r.val = {sign, 31'd0}; return r; end
    p = 0;
    for (int i = 0; i < 600; i++) if (m[i]) p = i;
    e    = p - 173;
    kept = m >> (p - 23);
    rest = m & ((big_t'(1) << (p - 23)) - 1);
    half = big_t'(1) << (p - 24);
    g    = (rest & half) != 0;
    s    = (rest & (half - 1)) != 0;
    if (rne && g && (s || kept[0])) kept = kept + 1;
    if (kept[24]) begin kept = kept >> 1; e = e + 1; end
    r.flags[0] = g | s;
    if (e >= 255) begin
      r.val = rne ? {sign, 8'hFF, 23'd0} : {sign, 31'h7F7F_FFFF};
      r.flags[2] = 1; r.flags[0] = 1;
    end else if (e <= 0) begin
      r.val = {sign, 31'd0};
      r.flags[1] = 1; r.flags[0] = 1;
    end else begin
      r.val = {sign, 8'(e), kept[22:0]};
    end
    return r;
  endfunction

  // Signed sum of two exact values; an exact zero from opposite signs is +0.
  function automatic ref_res_t sum_round(logic sa, big_t ma, logic sb, big_t mb, logic rne);
    big_t m; logic s;
    if (sa == sb)      begin m = ma + mb; s = sa; end
    else if (ma >= mb) begin m = ma - mb; s = sa; end
    else               begin m = mb - ma; s = sb; end
    if (m == '0) s = sa & sb;
    return round_big(s, m, rne);
  endfunction

  function automatic ref_res_t ref_add(logic [31:0] a, logic [31:0] b0, logic sub, logic rne);
    ref_res_t r; logic [31:0] b;
    r = '0;
    b = b0 ^ {sub, 31'd0};
    if (is_nan(a) || is_nan(b)) begin            // the NaN operand's own bits
      r.val = is_nan(a) ? q(a) : q(b0); r.flags[4] = is_snan(a) || is_snan(b);
    end else if (is_inf(a) && is_inf(b) && a[31] != b[31]) begin
      r.val = R_QNAN; r.flags[4] = 1;
    end else if (is_inf(a)) r.val = a;
    else if (is_inf(b)) r.val = b;
    else r = sum_round(a[31], mag(a), b[31], mag(b), rne);
    return r;
  endfunction

  function automatic ref_res_t ref_mul(logic [31:0] a, logic [31:0] b, logic rne);
    ref_res_t r; logic s;
    r = '0;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) begin
      r.val = is_nan(a) ? q(a) : q(b); r.flags[4] = is_snan(a) || is_snan(b);
    end else if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
      r.val = R_QNAN; r.flags[4] = 1;
    end else if (is_inf(a) || is_inf(b)) r.val = {s, 8'hFF, 23'd0};
    else if (is_zero(a) || is_zero(b)) r.val = {s, 31'd0};
    else r = round_big(s, prod(a, b), rne);
    return r;
  endfunction

  function automatic ref_res_t ref_fma(logic [31:0] a, logic [31:0] b, logic [31:0] c, logic rne);
    ref_res_t r; logic s; logic inv0;
    big_t pm;
    r = '0;
    s = a[31] ^ b[31];
    inv0 = (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b));
    if (is_nan(a) || is_nan(b)) begin
      r.val = is_nan(a) ? q(a) : q(b);
      r.flags[4] = is_snan(a) || is_snan(b) || is_snan(c);
    end else if (inv0) begin
      r.val = R_QNAN; r.flags[4] = 1;
    end else if (is_nan(c)) begin
      r.val = q(c); r.flags[4] = is_snan(c);
    end else if ((is_inf(a) || is_inf(b)) && is_inf(c) && s != c[31]) begin
      r.val = R_QNAN; r.flags[4] = 1;
    end else if (is_inf(a) || is_inf(b)) r.val = {s, 8'hFF, 23'd0};
    else if (is_inf(c)) r.val = c;
    else if (is_zero(a) || is_zero(b)) begin
      if (is_zero(c)) r.val = {s & c[31], 31'd0};
      else            r.val = c;
    end else begin
      pm = prod(a, b);
      r  = sum_round(s, pm, c[31], mag(c), rne);
    end
    return r;
  endfunction

  function automatic ref_res_t ref_i2f(logic [31:0] x, logic rne);
    big_t m; logic [31:0] u;
    u = x[31] ? (~x + 32'd1) : x;
    m = big_t'(u) << 300;
    return round_big(x[31], m, rne);
  endfunction

  // Float to integer, truncating; out-of-range (|x| >= 2^31) and NaN give 0 and invalid.
  function automatic ref_res_t ref_f2i(logic [31:0] x);
    ref_res_t r; big_t m, ip;
    r = '0;
    if (is_nan(x) || is_inf(x)) begin r.flags[4] = 1; return r; end
    m  = mag(x);
    ip = m >> 300;
    if (ip >= (big_t'(1) << 31)) begin r.flags[4] = 1; return r; end
    r.flags[0] = (m & ((big_t'(1) << 300) - 1)) != 0;
    r.val = x[31] ? (~ip[31:0] + 32'd1) : ip[31:0];
    return r;
  endfunction

  // Comparison on exact values: returns {nv, gt, eq, lt} with gt = !(lt | eq).
  function automatic logic [3:0] ref_cmp(logic [31:0] a, logic [31:0] b);
    logic lt, eq, nv; big_t ma, mb;
    if (is_nan(a) || is_nan(b)) return 4'b1100;
    ma = is_inf(a) ? ~big_t'(0) : mag(a);
    mb = is_inf(b) ? ~big_t'(0) : mag(b);
    nv = is_inf(a) && is_inf(b) && a[31] == b[31];
    if (ma == 0 && mb == 0) begin lt = 0; eq = 1; end
    else if (a[31] != b[31]) begin lt = a[31]; eq = 0; end
    else if (!a[31]) begin lt = ma < mb; eq = ma == mb; end
    else begin lt = ma > mb; eq = ma == mb; end
    return {nv, !(lt || eq), eq, lt};
  endfunction

  // Random operand biased towards the interesting classes.
  function automatic logic [31:0] rand_fp();
    logic [31:0] r;
    int unsigned k;
    r = $urandom;
    k = $urandom_range(0, 99);
    if      (k < 4)  r[30:0] = 31'd0;                              // +-0
    else if (k < 7)  r[30:0] = {8'hFF, 23'd0};                     // +-inf
    else if (k < 9)  r[30:0] = {8'hFF, 1'b1, r[21:0]};             // qNaN
    else if (k < 11) r[30:0] = {8'hFF, 1'b0, r[21:1], 1'b1};       // sNaN
    else if (k < 14) r[30:23] = 8'h00;                             // denormal
    else if (k < 22) r[30:23] = 8'($urandom_range(1, 30));         // tiny
    else if (k < 30) r[30:23] = 8'($urandom_range(225, 254));      // huge
    else if (k < 60) r[30:23] = 8'($urandom_range(120, 134));      // near one
    else if (r[30:23] == 8'hFF) r[30:23] = 8'h80;
    return r;
  endfunction

endpackage
