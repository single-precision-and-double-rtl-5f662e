// fpmul_operand_proc: multiplicand and multiplier processing of the merged
// multiplier (first pipeline stage, combinational).
//
// SP mode: each 23-bit fraction gets its hidden one and three zeros above it,
// giving four 27-bit operands; the first SP operation uses the "h" halves and
// the second the "l" halves:
//   mcand = {0001, a.frac1, 0001, a.frac2}, mlier = {0001, b.frac1, 0001, b.frac2}.
// DP mode: the multiplicand {01, a.frac} is split into two 27-bit halves that
// stay fixed for both iterations. The multiplier {01, b.frac} is split the
// same way, and both multipliers receive the same half: the low half
// b.frac[26:0] in iteration 0 and {01, b.frac[51:27]} in iteration 1.
// Iteration 0 thus forms A_l*B_l and A_h*B_l, iteration 1 A_l*B_h and A_h*B_h.
// These layouts follow the source design.
// Lint note: sign and exponent bits a/b[63:55] are not mantissa bits and
// are not read here (full operand words keep the connection simple).
module fpmul_operand_proc (
  input  logic        dp,
  input  logic        itr,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [26:0] mcand_h,
  output logic [26:0] mcand_l,
  output logic [26:0] mlier_h,
  output logic [26:0] mlier_l
);
  logic [53:0] mcand_dp, mcand_sp, mcand;
  logic [53:0] mlier_dp_itr1, mlier_dp_itr0, mlier_dp, mlier_sp, mlier;

  always_comb begin
    mcand_dp      = {2'b01, a[51:0]};
    mcand_sp      = {4'b0001, a[54:32], 4'b0001, a[22:0]};
    mcand         = dp ? mcand_dp : mcand_sp;

    mlier_dp_itr1 = {2'b01, b[51:27], 2'b01, b[51:27]};
    mlier_dp_itr0 = {b[26:0], b[26:0]};
    mlier_dp      = itr ? mlier_dp_itr1 : mlier_dp_itr0;
    mlier_sp      = {4'b0001, b[54:32], 4'b0001, b[22:0]};
    mlier         = dp ? mlier_dp : mlier_sp;

    mcand_h = mcand[53:27];
    mcand_l = mcand[26:0];
    mlier_h = mlier[53:27];
    mlier_l = mlier[26:0];
  end

endmodule
