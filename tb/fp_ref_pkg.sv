// fp_ref_pkg: reference arithmetic and stimulus helpers for the testbenches.
//
// Expected results come from the simulator's IEEE double arithmetic, which is
// independent of the RTL. DP results are used directly. SP results are formed
// in double and then rounded to binary32 with round-to-nearest-even by
// sp_from_double: a product of two binary32 values is exact in double, and a
// binary32 sum is either exact in double or so far from a rounding midpoint
// that the second rounding cannot change it, so both are correctly rounded.
// Operands are normal numbers whose exponents stay well inside the normal
// range, so results are normal too (or exactly zero for x - x).
package fp_ref_pkg;

  function automatic logic [31:0] sp_from_double(input logic [63:0] d);
    logic        s;
    logic [10:0] e;
    logic [51:0] m;
    logic [23:0] keep;
    logic [28:0] rem;
    logic [7:0]  se;
    s = d[63]; e = d[62:52]; m = d[51:0];
    if (d[62:0] == 63'd0) return {s, 31'd0};
    keep = {1'b1, m[51:29]};
    rem  = m[28:0];
    se   = 8'(int'(e) - 1023 + 127);
    if (rem > 29'h1000_0000 || (rem == 29'h1000_0000 && keep[0])) begin
      keep = keep + 24'd1;
      if (keep == 24'd0) begin keep = 24'h800000; se = se + 8'd1; end
    end
    return {s, se, keep[22:0]};
  endfunction

  function automatic logic [63:0] double_from_sp(input logic [31:0] f);
    if (f[30:0] == 31'd0) return {f[31], 63'd0};
    return {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
  endfunction

  function automatic logic [63:0] dp_mul(input logic [63:0] a, input logic [63:0] b);
    return $realtobits($bitstoreal(a) * $bitstoreal(b));
  endfunction

  function automatic logic [63:0] dp_add(input logic [63:0] a, input logic [63:0] b, input logic sub);
    real r;
    r = sub ? ($bitstoreal(a) - $bitstoreal(b)) : ($bitstoreal(a) + $bitstoreal(b));
    return $realtobits(r);
  endfunction

  function automatic logic [31:0] sp_mul(input logic [31:0] a, input logic [31:0] b);
    return sp_from_double(dp_mul(double_from_sp(a), double_from_sp(b)));
  endfunction

  function automatic logic [31:0] sp_add(input logic [31:0] a, input logic [31:0] b, input logic sub);
    return sp_from_double(dp_add(double_from_sp(a), double_from_sp(b), sub));
  endfunction

  // Random normal numbers with exponent bias +/- span.
  function automatic logic [63:0] rand_dp(input int span);
    logic [51:0] m;
    m = {$urandom(), $urandom()};
    return {1'($urandom()), 11'(1023 - span + int'($urandom_range(0, 2 * span))), m};
  endfunction

  function automatic logic [31:0] rand_sp(input int span);
    return {1'($urandom()), 8'(127 - span + int'($urandom_range(0, 2 * span))), 23'($urandom())};
  endfunction

  // A random partner for x: exponent within dmax of x's, and with probability
  // about one half a fraction that agrees with x's in its upper bits, so that
  // subtraction cancels many leading bits.
  function automatic logic [63:0] near_dp(input logic [63:0] x, input int dmax);
    logic [63:0] y;
    int          k;
    y = rand_dp(10);
    y[62:52] = 11'(int'(x[62:52]) + int'($urandom_range(0, 2 * dmax)) - dmax);
    if ($urandom_range(0, 1) == 1) begin
      k = int'($urandom_range(1, 51));
      y[51:0] = (x[51:0] & ~((52'd1 << k) - 52'd1)) | (y[51:0] & ((52'd1 << k) - 52'd1));
    end
    return y;
  endfunction

  function automatic logic [31:0] near_sp(input logic [31:0] x, input int dmax);
    logic [31:0] y;
    int          k;
    y = rand_sp(10);
    y[30:23] = 8'(int'(x[30:23]) + int'($urandom_range(0, 2 * dmax)) - dmax);
    if ($urandom_range(0, 1) == 1) begin
      k = int'($urandom_range(1, 22));
      y[22:0] = (x[22:0] & ~((23'd1 << k) - 23'd1)) | (y[22:0] & ((23'd1 << k) - 23'd1));
    end
    return y;
  endfunction

endpackage
