// fpmul_dp_round: rounding selection, normalisation and packing of the DP
// product (pipeline stage 8, combinational; the unit registers the result).
//
// The upper 54 bits of the product are sum + lower_cout; R is lower_bits[51]
// and the sticky bit is the OR of lower_bits[50:0]. As the source design
// describes, lower_cout is first folded into the L position (giving sum or
// sum+1 as the base value) and the round-to-nearest-even decision is then
// made on the base value's N, L, R and sticky bits; rounding up selects the
// next sum (sum+1 or sum+2). The candidate LSB is L (bit 52 of the product)
// when the base value's MSB (bit 105) is 0 and N (bit 53) when it is 1; the
// increment always goes to L, which is 1 whenever rounding is needed with the
// MSB set. Normalisation then looks at the MSB of the selected sum.
// The MSB of the base value (rather than of sum alone) decides the LSB
// position; this covers the case where lower_cout itself carries into bit 105.
module fpmul_dp_round (
  input  logic [53:0] sum0,
  input  logic [53:0] sum1,
  input  logic [53:0] sum2,
  input  logic        lower_cout,
  input  logic [51:0] lower_bits,
  input  logic        sign,
  input  logic [10:0] exp,
  output logic [63:0] result
);
  logic [53:0] base, base_p1, sel;
  logic        n_b, l_b, r_b, stk, rnd;
  logic [51:0] mant;
  logic [10:0] e;

  always_comb begin
    base    = lower_cout ? sum1 : sum0;
    base_p1 = lower_cout ? sum2 : sum1;
    n_b = base[1];
    l_b = base[0];
    r_b = lower_bits[51];
    stk = |lower_bits[50:0];
    rnd = base[53] ? (l_b & (n_b | r_b | stk)) : (r_b & (l_b | stk));
    sel = rnd ? base_p1 : base;
    if (sel[53]) begin
      mant = sel[52:1];
      e    = exp + 11'd1;
    end else begin
      mant = sel[51:0];
      e    = exp;
    end
    result = {sign, e, mant};
  end

endmodule
