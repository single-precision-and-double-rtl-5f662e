// fpadd_near_alu: NEAR-path ALU of the merged adder (pipeline stages 2 and 3,
// registered at the end of each).
//
// The NEAR path handles effective subtractions whose exponents differ by 0
// or 1, so it only subtracts. Operands come from fp_pkg::near_operands: A is
// {1, m1, 00} and B the other mantissa, shifted right by one when the
// exponents differ by one. The 55-bit subtractor is split into an upper lane
// [54:28] (27 bits plus a sign-extension bit) and a lower lane [27:0].
// Stage 2 forms both A + ~B + 1 and A + ~B. In DP mode the upper lane is a
// compound adder whose two sums (carry-in 0 and 1) are selected by the lower
// lane's carry; in SP mode each lane gets its own carry-in.
// Stage 3 reads the sign of each lane (upper: the extension bit; lower in SP
// mode: bit 27, which lies in the zero gap between the SP numbers) and takes
// A + ~B + 1 if it is positive, or the bitwise inverse of A + ~B if it is
// negative, since -(A - B) = ~(A + ~B). No rounding is needed here: the NEAR
// result is only used when it is exact.
// Interface: mag is the magnitude in the 55-bit layout, neg1/neg2 the lane
// signs (neg2 = neg1 in DP mode), all two clocks after the inputs.
// Lint note: bit 55 of p0 (A + ~B) is not read: the lane signs are taken
// from p1 and a negative DP result only needs the 55 magnitude bits.
module fpadd_near_alu (
  input  logic        clk,
  input  logic        dp,
  input  logic [51:0] m1,
  input  logic [51:0] m2,
  input  logic        d1,
  input  logic        d2,
  output logic [54:0] mag,
  output logic        neg1,
  output logic        neg2
);
  import fp_pkg::*;

  logic [54:0] a, b;
  logic [28:0] lo1, lo0;          // {carry, 28-bit sum}
  logic [27:0] up1, up0;          // {sign extension, 27-bit sum}
  logic [55:0] p1_d, p0_d, p1, p0;
  logic        dp_q;

  always_comb begin
    {a, b} = near_operands(dp, m1, m2, d1, d2);
    lo1 = {1'b0, a[27:0]} + {1'b0, ~b[27:0]} + 29'd1;
    lo0 = {1'b0, a[27:0]} + {1'b0, ~b[27:0]};
    up1 = {1'b0, a[54:28]} + {1'b1, ~b[54:28]} + 28'd1;
    up0 = {1'b0, a[54:28]} + {1'b1, ~b[54:28]};
    if (dp) begin
      p1_d = {lo1[28] ? up1 : up0, lo1[27:0]};
      p0_d = {lo0[28] ? up1 : up0, lo0[27:0]};
    end else begin
      p1_d = {up1, lo1[27:0]};
      p0_d = {up0, lo0[27:0]};
    end
  end

  always_ff @(posedge clk) begin
    p1   <= p1_d;
    p0   <= p0_d;
    dp_q <= dp;
  end

  logic n1, n2;
  always_comb begin
    n1 = p1[55];
    n2 = dp_q ? n1 : p1[27];
  end

  always_ff @(posedge clk) begin
    neg1 <= n1;
    neg2 <= n2;
    mag  <= {n1 ? ~p0[54:28] : p1[54:28], n2 ? ~p0[27:0] : p1[27:0]};
  end

endmodule
