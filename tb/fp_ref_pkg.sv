// Reference model for the testbenches: IEEE-754 single (and half) precision
// with the same special-value conventions as the RTL (subnormals flushed to
// zero on input and output, round to nearest even, overflow to infinity).
//
// Values are computed in double precision and then rounded once to single
// precision. A double holds the exact product of two singles, and its 53-bit
// significand is wide enough that rounding a double sum of two singles to
// single precision gives the correctly rounded single sum, so the model is
// exact for one add or one multiply.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic bit is_nan(logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != '0);
  endfunction

  function automatic bit is_inf(logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] == '0);
  endfunction

  // single -> real, subnormals read as zero
  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00)
      d = {f[31], 63'd0};
    else
      d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // real -> single, round to nearest even, flush to zero, overflow to inf
  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] sig;
    logic [24:0] keep;
    logic        g, st;
    d   = $realtobits(r);
    s   = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    sig = {1'b1, d[51:0]};
    keep = {1'b0, sig[52:29]};
    g   = sig[28];
    st  = |sig[27:0];
    if (g && (st || keep[0])) keep = keep + 1;
    if (keep[24]) begin
      keep = keep >> 1;
      e    = e + 1;
    end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), keep[22:0]};
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] == b[31]) ? a : QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (a[30:23] == 0 && b[30:23] == 0) return {a[31] & b[31], 31'd0};
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return fadd(a, {~b[31], b[30:0]});
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    logic s;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && b[30:23] == 0) || (is_inf(b) && a[30:23] == 0)) return QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'd0};
    if (a[30:23] == 0 || b[30:23] == 0) return {s, 31'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  // random normal single with exponent in [elo, ehi]
  function automatic logic [31:0] rnd_f(int elo, int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // ---- half precision (5-bit exponent, 10-bit fraction), same rules ------

  function automatic real h2r(logic [15:0] f);
    logic [63:0] d;
    if (f[14:10] == 5'h00)
      d = {f[15], 63'd0};
    else
      d = {f[15], 11'(int'(f[14:10]) - 15 + 1023), f[9:0], 42'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [15:0] r2h(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] sig;
    logic [11:0] keep;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, 15'd0};
    e    = int'(d[62:52]) - 1023 + 15;
    sig  = {1'b1, d[51:0]};
    keep = {1'b0, sig[52:42]};
    g    = sig[41];
    st   = |sig[40:0];
    if (g && (st || keep[0])) keep = keep + 1;
    if (keep[11]) begin
      keep = keep >> 1;
      e    = e + 1;
    end
    if (e <= 0)  return {s, 15'd0};
    if (e >= 31) return {s, 5'h1F, 10'd0};
    return {s, 5'(e), keep[9:0]};
  endfunction

  function automatic bit h_nan(logic [15:0] f);
    return (f[14:10] == 5'h1F) && (f[9:0] != '0);
  endfunction

  function automatic bit h_inf(logic [15:0] f);
    return (f[14:10] == 5'h1F) && (f[9:0] == '0);
  endfunction

  function automatic logic [15:0] hadd(logic [15:0] a, logic [15:0] b);
    if (h_nan(a) || h_nan(b)) return 16'h7E00;
    if (h_inf(a) && h_inf(b)) return (a[15] == b[15]) ? a : 16'h7E00;
    if (h_inf(a)) return a;
    if (h_inf(b)) return b;
    if (a[14:10] == 0 && b[14:10] == 0) return {a[15] & b[15], 15'd0};
    return r2h(h2r(a) + h2r(b));
  endfunction

  function automatic logic [15:0] hsub(logic [15:0] a, logic [15:0] b);
    return hadd(a, {~b[15], b[14:0]});
  endfunction

  function automatic logic [15:0] hmul(logic [15:0] a, logic [15:0] b);
    logic s;
    s = a[15] ^ b[15];
    if (h_nan(a) || h_nan(b)) return 16'h7E00;
    if ((h_inf(a) && b[14:10] == 0) || (h_inf(b) && a[14:10] == 0)) return 16'h7E00;
    if (h_inf(a) || h_inf(b)) return {s, 5'h1F, 10'd0};
    if (a[14:10] == 0 || b[14:10] == 0) return {s, 15'd0};
    return r2h(h2r(a) * h2r(b));
  endfunction

endpackage
