// fpmul_sp_round: rounding, normalisation and packing of one single-precision
// product (combinational; the multiplier uses two of these in stage 6).
//
// The 24x24 significand product fits in the low 48 bits of the 54-bit
// multiplier output; bits 53:48 are always zero and ignored. With S = p[47:0]
// the candidate LSB is L = S[23] when S[47] = 0 and N = S[24] when S[47] = 1;
// R = S[22] and the sticky bit is the OR of S[21:0]. Round to nearest, ties
// to even:
//   S[47] = 0 : round = R & (L | sticky)
//   S[47] = 1 : round = L & (N | R | sticky)
// The increment is always added at the L position: when S[47] = 1 and
// rounding is needed, L is 1, so the carry lands on N. Normalisation looks at
// the rounded value, so the case S[47] = 0 that rounds up to 2.0 is also
// shifted right and the exponent incremented.
// Interface: p is the multiplier output, sign/exp come from stage 1, result
// is the packed binary32 word.
// Lint note: p[53:48] is always zero, since the product of two 24-bit
// significands has at most 48 bits; the 54-bit port matches the multiplier.
module fpmul_sp_round (
  input  logic [53:0] p,
  input  logic        sign,
  input  logic [7:0]  exp,
  output logic [31:0] result
);
  logic [47:0] s;
  logic        n_b, l_b, r_b, stk, rnd;
  logic [24:0] rounded;
  logic [22:0] mant;
  logic [7:0]  e;

  always_comb begin
    s   = p[47:0];
    n_b = s[24];
    l_b = s[23];
    r_b = s[22];
    stk = |s[21:0];
    rnd = s[47] ? (l_b & (n_b | r_b | stk)) : (r_b & (l_b | stk));
    rounded = s[47:23] + {24'b0, rnd};
    if (rounded[24]) begin
      mant = rounded[23:1];
      e    = exp + 8'd1;
    end else begin
      mant = rounded[22:0];
      e    = exp;
    end
    result = {sign, e, mant};
  end

endmodule
