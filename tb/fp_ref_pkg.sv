// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are widened to double precision, combined there, and rounded back
// to single precision with round-to-nearest-even. A product of two singles is
// exact in double precision, and a sum rounded first to double and then to
// single gives the correctly rounded single result, because double has more
// than 2*24+2 mantissa bits. The conventions match the hardware: subnormals
// flush to signed zero, NaN results are 0x7FC00000.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic is_nan(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction

  function automatic logic is_inf(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] == 0);
  endfunction

  function automatic logic is_zero(input logic [31:0] f);
    return (f[30:23] == 8'h00);   // zero or flushed subnormal
  endfunction

  // single bits -> real (finite values only)
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (is_zero(f)) d = {f[31], 63'd0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // real -> single bits, round to nearest even, flush subnormal results
  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        rnd, stk;
    d = $realtobits(x);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? QNAN : {d[63], 8'hFF, 23'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    rnd = d[28];
    stk = |d[27:0];
    m   = {2'b01, d[51:29]} + 25'(rnd && (stk || d[29]));
    if (m[24]) begin
      e = e + 1;
      m = 25'd0;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    logic s;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a))) return QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] == b[31]) ? a : QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return {a[31] & b[31], 31'd0};
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    if (a[31] != b[31] && a[30:0] == b[30:0]) return 32'd0;
    return r2f(f2r(a) + f2r(b));
  endfunction

  // random normal number with biased exponent in [elo, ehi]
  function automatic logic [31:0] rand_f(input int elo, input int ehi);
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(elo + int'($urandom % 32'(ehi - elo + 1))), r[22:0]};
  endfunction

  // one atom of the tiled Verlet loop, in the order the pipeline rounds:
  // vel' = vel + f*M ; pos' = pos + dt*vel'
  function automatic logic [63:0] ref_verlet(input logic [31:0] f, input logic [31:0] m,
                                             input logic [31:0] vel, input logic [31:0] pos,
                                             input logic [31:0] dt);
    logic [31:0] v1, p1;
    v1 = ref_add(vel, ref_mul(f, m));
    p1 = ref_add(pos, ref_mul(dt, v1));
    return {p1, v1};
  endfunction

endpackage
