// Reference arithmetic for the testbenches.
//
// Single-precision values are widened to double precision, operated on with
// the simulator's double arithmetic, and rounded back to single precision
// with round-to-nearest-even. Because double precision has more than twice
// the significand bits of single precision plus two, this double rounding
// gives the correctly rounded single result for +, -, * and /. Subnormal
// results flush to zero, overflow gives infinity and a NaN or infinity
// operand gives the canonical quiet NaN, as in the RTL.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 3'b000 + 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] rnd;
    int          e;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    m   = {1'b1, d[51:0]};
    g   = m[28];
    s   = |m[27:0];
    rnd = {1'b0, m[52:29]} + 25'(g && (s || m[29]));
    if (rnd[24]) begin
      e   = e + 1;
      rnd = rnd >> 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), rnd[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return 32'h7FC0_0000;
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] ref_sub(logic [31:0] a, logic [31:0] b);
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return 32'h7FC0_0000;
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return 32'h7FC0_0000;
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] ref_div(logic [31:0] a, logic [31:0] b);
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return 32'h7FC0_0000;
    return r2f(f2r(a) / f2r(b));
  endfunction

  // Random normal number with biased exponent in [lo, hi].
  function automatic logic [31:0] rand_fp(int lo, int hi);
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(lo + ($urandom % (hi - lo + 1)));
    return r;
  endfunction

  // Random positive number (concentrations and rate constants are positive).
  function automatic logic [31:0] rand_pos(int lo, int hi);
    logic [31:0] r;
    r = rand_fp(lo, hi);
    r[31] = 1'b0;
    return r;
  endfunction

endpackage
