// fpadd_path_select: final result selection of the merged adder (pipeline
// stage 6, registered output).
//
// For each lane the NEAR result is taken when the FAR path flagged it as
// unusable (u_n), otherwise the FAR result. The FAR result always carries the
// sign of the larger-exponent operand; the NEAR result carries that sign
// flipped when the NEAR subtraction was negative. An exact zero NEAR result
// is returned as +0 (round to nearest). In DP mode lane 1 gives the 64-bit
// result; in SP mode lane 1 gives result[63:32] and lane 2 result[31:0].
// The +0 rule is this design's choice; the paper does not discuss zeros.
module fpadd_path_select (
  input  logic        clk,
  input  logic        dp,
  input  logic        s1,
  input  logic        s2,
  input  logic        u_n1,
  input  logic        u_n2,
  input  logic [51:0] far_mant,
  input  logic [10:0] far_e1,
  input  logic [7:0]  far_e2,
  input  logic        neg1,
  input  logic        neg2,
  input  logic [51:0] near_mant,
  input  logic [10:0] near_e1,
  input  logic [7:0]  near_e2,
  input  logic        zero1,
  input  logic        zero2,
  output logic [63:0] result
);
  logic        sg1, sg2;
  logic [10:0] ex1;
  logic [7:0]  ex2;
  logic [51:0] mn;
  logic [63:0] result_d;

  always_comb begin
    if (u_n1) begin
      sg1 = zero1 ? 1'b0 : (s1 ^ neg1);
      ex1 = zero1 ? 11'd0 : near_e1;
      mn[51:26] = zero1 ? 26'd0 : near_mant[51:26];
    end else begin
      sg1 = s1;
      ex1 = far_e1;
      mn[51:26] = far_mant[51:26];
    end
    if (dp ? u_n1 : u_n2) begin
      sg2 = zero2 ? 1'b0 : (s2 ^ neg2);
      ex2 = zero2 ? 8'd0 : near_e2;
      mn[25:0] = zero2 ? 26'd0 : near_mant[25:0];
    end else begin
      sg2 = s2;
      ex2 = far_e2;
      mn[25:0] = far_mant[25:0];
    end
    if (dp) result_d = {sg1, ex1, mn};
    else    result_d = {sg1, ex1[7:0], mn[51:29], sg2, ex2, mn[22:0]};
  end

  always_ff @(posedge clk) result <= result_d;

endmodule
