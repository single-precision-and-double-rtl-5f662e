// fp_pkg: constants and small helpers shared by the merged single/double
// precision multiplier and adder.
//
// Operand layout used by both units (64-bit words):
//   DP mode : word = {sign, exp[10:0], frac[51:0]}            (IEEE binary64)
//   SP mode : word = {sp_one[31:0], sp_two[31:0]}             (two IEEE binary32)
// The first SP operation lives in the upper half, the second in the lower half,
// so the DP sign and the first SP sign share bit 63.
//
// Latencies: multiplier SP 6, DP 9 clocks; adder 6 clocks (see the tops).
// Only normal numbers are handled (as in the source design); exponents that
// leave the normal range wrap in the exponent field.
package fp_pkg;

  // NEAR-path operands. A = {1, m1, 00} is the larger-exponent operand,
  // B = {1, m2, 00} shifted right by one when the exponents differ by one.
  // The shift is done per lane in SP mode (upper lane [54:28] by d1, lower
  // lane [27:0] by d2) and over the whole vector in DP mode.
  function automatic logic [109:0] near_operands(input logic dp, input logic [51:0] m1,
                                                 input logic [51:0] m2, input logic d1, input logic d2);
    logic [54:0] a, b, bs;
    a = {1'b1, m1, 2'b00};
    b = {1'b1, m2, 2'b00};
    if (dp) bs = d1 ? (b >> 1) : b;
    else    bs = {d1 ? (b[54:28] >> 1) : b[54:28], d2 ? (b[27:0] >> 1) : b[27:0]};
    return {a, bs};
  endfunction

endpackage
