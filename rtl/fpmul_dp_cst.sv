// fpmul_dp_cst: double-precision carry-save tree of the merged multiplier
// (pipeline stage 6 in DP mode), which also closes the iteration loop.
//
// Each iteration delivers product_l (multiplicand low half times the current
// multiplier half) and product_h (multiplicand high half times it). In the
// 108-bit accumulation window product_l is placed at bit 27 and product_h at
// bit 54. Two levels of (3,2) counters compress feedback_sum, feedback_carry,
// product_l and product_h into vec_s and vec_c, both registered.
// vec_c is kept in unshifted form: vec_c[i] carries weight 2^(i+1).
//
// Iteration 0: both feedback vectors are zero, so only vec_s[107:27] and
// vec_c[80:54] can be non-zero. Iteration 1: these are fed back moved down by
// 27 bits (feedback_sum = vec_s[107:27] at bit 0, feedback_carry =
// vec_c[80:54] at bit 27), which accounts for the 2^27 weight difference
// between the multiplier halves. Only 81 + 27 feedback bits are needed, as in
// the source design.
// Interface: load captures a new vec_s/vec_c at the clock edge; itr selects
// whether the registered vectors are fed back (1) or zeros are used (0).
// Lint note: the top bit of the first counter level's carry vector c1 falls
// outside the 108-bit window and is not needed (the product fits in 106 bits).
module fpmul_dp_cst (
  input  logic         clk,
  input  logic         load,
  input  logic         itr,
  input  logic [53:0]  product_h,
  input  logic [53:0]  product_l,
  output logic [107:0] vec_s,
  output logic [107:0] vec_c
);
  logic [80:0]  feedback_sum;
  logic [26:0]  feedback_carry;
  logic [107:0] in_fs, in_fc, in_pl, in_ph;
  logic [107:0] s1, c1, c1w, s2, c2;

  always_comb begin
    feedback_sum   = itr ? vec_s[107:27] : '0;
    feedback_carry = itr ? vec_c[80:54]  : '0;
    in_fs = {27'b0, feedback_sum};
    in_fc = {53'b0, feedback_carry, 28'b0};     // weight 2^(27+1+k)
    in_pl = {27'b0, product_l, 27'b0};
    in_ph = {product_h, 54'b0};
    // level 1: feedback_sum + feedback_carry + product_l
    s1  = in_fs ^ in_fc ^ in_pl;
    c1  = (in_fs & in_fc) | (in_fs & in_pl) | (in_fc & in_pl);
    c1w = {c1[106:0], 1'b0};
    // level 2: s1 + 2*c1 + product_h
    s2  = s1 ^ c1w ^ in_ph;
    c2  = (s1 & c1w) | (s1 & in_ph) | (c1w & in_ph);
  end

  always_ff @(posedge clk) begin
    if (load) begin
      vec_s <= s2;
      vec_c <= c2;
    end
  end

endmodule
