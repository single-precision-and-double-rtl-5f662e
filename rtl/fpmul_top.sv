// fpmul_top: single/double precision merged floating-point multiplier.
//
// One 64-bit operand pair holds either one DP multiplication or two SP
// multiplications (upper halves and lower halves). Two 27x27 Karatsuba
// mantissa multipliers are shared by both modes:
//   SP: the two multipliers compute the two 24x24 products in one pass;
//       latency 6, one operand pair per clock.
//   DP: the 54-bit multiplicand is split over the two multipliers and the
//       54-bit multiplier is fed in two halves, one per iteration; a
//       carry-save tree with feedback accumulates the four partial products;
//       latency 9, the multipliers are busy for two clocks.
// Stages: 1 operand / sign / exponent processing; 2-5 mantissa multipliers;
// 6 SP rounding (SP) or carry-save tree (DP); 7 DP compound adder;
// 8 DP rounding. The result register follows stage 6 (SP) or stage 8 (DP).
//
// Interface (valid/ready, all synchronous to clk, rst_n active low and
// synchronous):
//   in_valid/in_ready: an operation is accepted when both are high.
//   in_dp: 1 = DP, 0 = two SP; in_a = multiplicand word, in_b = multiplier.
//   out_valid pulses for one clock with out_dp and out_result.
// A result appears exactly 6 (SP) or 9 (DP) clocks after its acceptance.
// in_ready is this design's own flow control, which the source does not
// describe: it drops in the clock after a DP acceptance (second iteration
// reuses the multipliers) and three clocks after it (an SP operation accepted
// then would reach the result register in the same clock as the DP result).
// Only normal operands and normal results are supported.
// Lint note: the control struct is carried whole to stage 7, where only the
// DP fields are still read; the unused fields are removed by synthesis.
module fpmul_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_dp,
  input  logic [63:0] in_a,
  input  logic [63:0] in_b,
  output logic        out_valid,
  output logic        out_dp,
  output logic [63:0] out_result
);
  import fp_pkg::*;

  typedef struct packed {
    logic        valid;
    logic        dp;
    logic        itr;
    logic        s_h;
    logic        s_l;
    logic [10:0] exp_h;
    logic [7:0]  exp_l;
  } ctrl_t;

  // ---------------- issue / iteration control ----------------
  logic        accept;
  logic [2:0]  dp_hist;            // DP accepted 1, 2, 3 clocks ago
  logic [63:0] hold_a, hold_b;     // DP operands kept for iteration 1
  logic        iss_valid, iss_dp, iss_itr;
  logic [63:0] iss_a, iss_b;

  assign in_ready = ~dp_hist[0] & ~dp_hist[2];
  assign accept   = in_valid & in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) dp_hist <= '0;
    else        dp_hist <= {dp_hist[1:0], accept & in_dp};
    if (accept & in_dp) begin
      hold_a <= in_a;
      hold_b <= in_b;
    end
  end

  always_comb begin
    if (dp_hist[0]) begin
      iss_valid = 1'b1; iss_dp = 1'b1; iss_itr = 1'b1; iss_a = hold_a; iss_b = hold_b;
    end else begin
      iss_valid = accept; iss_dp = in_dp; iss_itr = 1'b0; iss_a = in_a; iss_b = in_b;
    end
  end

  // ---------------- stage 1 ----------------
  logic [26:0] mcand_h, mcand_l, mlier_h, mlier_l;
  logic [26:0] mcand_h_q, mcand_l_q, mlier_h_q, mlier_l_q;
  ctrl_t       c1_d;
  ctrl_t       c1, c2, c3, c4, c5, c6, c7;

  fpmul_operand_proc u_opp (
    .dp(iss_dp), .itr(iss_itr), .a(iss_a), .b(iss_b),
    .mcand_h(mcand_h), .mcand_l(mcand_l), .mlier_h(mlier_h), .mlier_l(mlier_l)
  );

  fpmul_sign_exp u_se (
    .dp(iss_dp), .a(iss_a), .b(iss_b),
    .s_h(c1_d.s_h), .s_l(c1_d.s_l), .exp_h(c1_d.exp_h), .exp_l(c1_d.exp_l)
  );
  assign c1_d.valid = iss_valid;
  assign c1_d.dp    = iss_dp;
  assign c1_d.itr   = iss_itr;

  always_ff @(posedge clk) begin
    mcand_h_q <= mcand_h;
    mcand_l_q <= mcand_l;
    mlier_h_q <= mlier_h;
    mlier_l_q <= mlier_l;
  end

  // control pipeline, stages 1..7
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c1 <= '0; c2 <= '0; c3 <= '0; c4 <= '0; c5 <= '0; c6 <= '0; c7 <= '0;
    end else begin
      c1 <= c1_d; c2 <= c1; c3 <= c2; c4 <= c3; c5 <= c4;
      c6 <= (c5.valid & c5.dp) ? c5 : '0;
      c7 <= (c6.valid & c6.itr) ? c6 : '0;
    end
  end

  // ---------------- stages 2-5: mantissa multipliers ----------------
  logic [53:0] product_h, product_l;

  kara_mul27 u_mul_h (.clk(clk), .en(1'b1), .a(mcand_h_q), .b(mlier_h_q), .p(product_h));
  kara_mul27 u_mul_l (.clk(clk), .en(1'b1), .a(mcand_l_q), .b(mlier_l_q), .p(product_l));

  // ---------------- stage 6: SP rounding / DP carry-save tree ----------------
  logic [31:0] sp_res_h, sp_res_l;
  logic [107:0] vec_s, vec_c;

  fpmul_sp_round u_spr_h (.p(product_h), .sign(c5.s_h), .exp(c5.exp_h[7:0]), .result(sp_res_h));
  fpmul_sp_round u_spr_l (.p(product_l), .sign(c5.s_l), .exp(c5.exp_l),      .result(sp_res_l));

  fpmul_dp_cst u_cst (
    .clk(clk), .load(c5.valid & c5.dp), .itr(c5.itr),
    .product_h(product_h), .product_l(product_l), .vec_s(vec_s), .vec_c(vec_c)
  );

  // ---------------- stage 7: DP compound adder ----------------
  logic [53:0] sum0, sum1, sum2;
  logic        lower_cout;
  logic [51:0] lower_bits;

  fpmul_dp_compound_adder u_cadd (
    .clk(clk), .en(1'b1), .vec_s(vec_s), .vec_c(vec_c),
    .sum0(sum0), .sum1(sum1), .sum2(sum2), .lower_cout(lower_cout), .lower_bits(lower_bits)
  );

  // ---------------- stage 8: DP rounding ----------------
  logic [63:0] dp_res;

  fpmul_dp_round u_dpr (
    .sum0(sum0), .sum1(sum1), .sum2(sum2), .lower_cout(lower_cout), .lower_bits(lower_bits),
    .sign(c7.s_h), .exp(c7.exp_h), .result(dp_res)
  );

  // ---------------- result register ----------------
  logic sp_done, dp_done;
  assign sp_done = c5.valid & ~c5.dp;
  assign dp_done = c7.valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_dp     <= 1'b0;
      out_result <= '0;
    end else begin
      out_valid <= sp_done | dp_done;
      out_dp    <= dp_done;
      if (dp_done)      out_result <= dp_res;
      else if (sp_done) out_result <= {sp_res_h, sp_res_l};
    end
  end

  // The issue rule keeps SP and DP results from meeting at the result register.
  a_no_result_clash: assert property (@(posedge clk) disable iff (!rst_n) !(sp_done && dp_done));

endmodule
