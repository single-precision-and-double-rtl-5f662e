// fpadd_top: merged single/double precision floating-point adder.
//
// One 64-bit operation per clock: either one DP addition/subtraction or two
// independent SP additions/subtractions packed as {sp_one, sp_two}. op[1] is
// the operation of the DP / first SP lane, op[0] that of the second SP lane
// (0 add, 1 subtract). Result after ADD_LATENCY = 6 clocks, fully pipelined,
// no stall (in_valid is carried alongside as out_valid).
//
// Dual-path structure:
//   stage 1  fpadd_setup           exponent compare, swap, sign/eop
//   FAR path (effective add, or exponent difference > 1, or little cancellation)
//   stage 2-3 fpadd_align_shifter  right shift of the smaller operand, stickies
//   stage 4  fpadd_far_alu         merged compound adder (sum, sum+1)
//   stage 5  fpadd_far_round       round to nearest even, 1-bit normalisation,
//                                  u_n = FAR result unusable
//   NEAR path (effective subtract with exponent difference 0 or 1)
//   stage 2-3 fpadd_near_alu       exact subtraction and magnitude
//   stage 2-4 fpadd_lzac           leading zero anticipation and count
//   stage 5  fpadd_norm_shifter    left normalisation
//   stage 6  fpadd_path_select     per-lane choice and packing
// Operands must be normal numbers and the result must stay in the normal
// range (no overflow, underflow, NaN or infinity handling), as in the source
// design. The valid pipeline and its synchronous reset are this design's choice.
// Lint note: the control struct is carried whole to stage 5, where only dp
// and the signs are still read; the unused fields are removed by synthesis.
module fpadd_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_dp,
  input  logic [1:0]  in_op,
  input  logic [63:0] in_a,
  input  logic [63:0] in_b,
  output logic        out_valid,
  output logic        out_dp,
  output logic [63:0] out_result
);
  import fp_pkg::*;

  typedef struct packed {
    logic        dp;
    logic [10:0] e1;
    logic [7:0]  e2;
    logic        s1;
    logic        s2;
    logic        eop1;
    logic        eop2;
  } ctrl_t;

  // stage 1
  logic        dp1, s1, s2, eop1, eop2;
  logic [10:0] e1;
  logic [7:0]  e2;
  logic [5:0]  sha1;
  logic [4:0]  sha2;
  logic [51:0] m1, m2;

  fpadd_setup u_setup (
    .clk, .dp(in_dp), .op(in_op), .operandone(in_a), .operandtwo(in_b),
    .dp_q(dp1), .e1, .e2, .sha1, .sha2, .m1, .m2, .s1, .s2, .eop1, .eop2
  );

  ctrl_t       c1, c2, c3, c4, c5;
  logic [51:0] m1_2, m1_3;
  logic [5:0]  vpipe;

  assign c1 = '{dp: dp1, e1: e1, e2: e2, s1: s1, s2: s2, eop1: eop1, eop2: eop2};

  always_ff @(posedge clk) begin
    c2   <= c1;
    c3   <= c2;
    c4   <= c3;
    c5   <= c4;
    m1_2 <= m1;
    m1_3 <= m1_2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[4:0], in_valid};
  end

  // FAR path
  logic [54:0] b55;
  logic        stk1, stk2;
  logic [59:0] sum0, sum1;
  logic [51:0] far_mant;
  logic [10:0] far_e1;
  logic [7:0]  far_e2;
  logic        u_n1, u_n2;

  fpadd_align_shifter u_align (
    .clk, .dp(c1.dp), .m2, .sha1, .sha2, .b55, .stk1, .stk2
  );

  fpadd_far_alu u_far_alu (
    .clk, .dp(c3.dp), .eop1(c3.eop1), .eop2(c3.eop2), .m1(m1_3), .b55, .stk1, .stk2,
    .sum0, .sum1
  );

  fpadd_far_round u_far_round (
    .clk, .dp(c4.dp), .eop1(c4.eop1), .eop2(c4.eop2), .e1(c4.e1), .e2(c4.e2),
    .sum0, .sum1, .mant(far_mant), .far_e1, .far_e2, .u_n1, .u_n2
  );

  // NEAR path
  logic        d1, d2;
  logic [54:0] mag, mag_4;
  logic        neg1, neg2, neg1_4, neg2_4, neg1_5, neg2_5;
  logic [5:0]  shn1;
  logic [4:0]  shn2;
  logic [51:0] near_mant;
  logic [10:0] near_e1;
  logic [7:0]  near_e2;
  logic        zero1, zero2;

  assign d1 = (sha1 == 6'd1);
  assign d2 = (sha2 == 5'd1);

  fpadd_near_alu u_near_alu (
    .clk, .dp(c1.dp), .m1, .m2, .d1, .d2, .mag, .neg1, .neg2
  );

  fpadd_lzac u_lzac (
    .clk, .dp(c1.dp), .m1, .m2, .d1, .d2, .shn1, .shn2
  );

  always_ff @(posedge clk) begin
    mag_4  <= mag;
    neg1_4 <= neg1;
    neg2_4 <= neg2;
    neg1_5 <= neg1_4;
    neg2_5 <= neg2_4;
  end

  fpadd_norm_shifter u_norm (
    .clk, .dp(c4.dp), .mag(mag_4), .shn1, .shn2, .e1(c4.e1), .e2(c4.e2),
    .mant(near_mant), .near_e1, .near_e2, .zero1, .zero2
  );

  // stage 6
  fpadd_path_select u_select (
    .clk, .dp(c5.dp), .s1(c5.s1), .s2(c5.s2), .u_n1, .u_n2,
    .far_mant, .far_e1, .far_e2, .neg1(neg1_5), .neg2(neg2_5),
    .near_mant, .near_e1, .near_e2, .zero1, .zero2, .result(out_result)
  );

  always_ff @(posedge clk) out_dp <= c5.dp;
  assign out_valid = vpipe[5];

endmodule
