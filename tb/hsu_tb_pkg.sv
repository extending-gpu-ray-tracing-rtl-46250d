// hsu_tb_pkg: reference arithmetic for the HSU testbenches. Values are held
// as IEEE single-precision bit patterns and computed in double precision,
// then rounded once to single precision with round-to-nearest-even, results
// below the normal range flushed to signed zero and denormal inputs read as
// zero, which is the arithmetic the datapath's functional units implement.
// Rounding a double-precision sum or product of two singles to single gives
// the correctly rounded single result, so these models are exact references.
package hsu_tb_pkg;

  function automatic logic is_nan(logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction

  // single bits -> real, denormals read as zero
  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    if (f[30:23] == 8'hFF) d = {f[31], 11'h7FF, f[22:0], 29'd0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // real -> single bits, round to nearest even, flush to zero below normal
  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [24:0] mr;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    mr = {1'b0, m[52:29]};
    g  = m[28];
    st = |m[27:0];
    if (g && (st || mr[0])) mr = mr + 1;
    if (mr[24]) begin mr = mr >> 1; e = e + 1; end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    if (a[30:23] == 0 && b[30:23] == 0) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 0) return b;
    if (b[30:23] == 0) return a;
    if (f2r(a) + f2r(b) == 0.0) return 32'd0;
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return fadd(a, {~b[31], b[30:0]});
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    if (is_nan(a) || is_nan(b)) return 32'h7FC0_0000;
    if ((a[30:23] == 0 && b[30:23] == 8'hFF) || (b[30:23] == 0 && a[30:23] == 8'hFF))
      return 32'h7FC0_0000;
    if (a[30:23] == 0 || b[30:23] == 0) return {a[31] ^ b[31], 31'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic flt(logic [31:0] a, logic [31:0] b);
    return f2r(a) < f2r(b);
  endfunction

  // random single with exponent in [2^lo, 2^hi)
  function automatic logic [31:0] frand(int lo, int hi);
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(127 + lo + int'($urandom % (hi - lo))), r[22:0]};
  endfunction

  function automatic logic [31:0] fpos(int lo, int hi);
    logic [31:0] r;
    r = frand(lo, hi);
    return {1'b0, r[30:0]};
  endfunction

endpackage
