// fpmul_dp_compound_adder: final carry-propagate addition of the DP carry-save
// vectors (pipeline stage 7, registered outputs).
//
// The 53x53 product needs only 106 bits, so vec_s/vec_c bits above 105 are
// dropped (vec_c is in unshifted form: vec_c[i] weighs 2^(i+1)). The sum is
// split into a lower 52-bit part that only feeds rounding and an upper 54-bit
// part that becomes the mantissa:
//   lower: vec_c is zero below bit 27, so vec_s[27:0] passes straight through
//          and a 24-bit adder forms bits 51:28 and the carry lower_cout;
//   upper: a compound adder forms sum, sum+1 and sum+2 of vec_s[105:52] and
//          the aligned vec_c[104:51] in parallel.
// lower_cout is not propagated into the upper part; rounding selects among
// the three upper sums instead.
// Lint note: vec_s[107:106], vec_c[107:105] are zero (106-bit product) and
// vec_c[26:0] is zero by construction of the feedback, so they are not read.
module fpmul_dp_compound_adder (
  input  logic         clk,
  input  logic         en,
  input  logic [107:0] vec_s,
  input  logic [107:0] vec_c,
  output logic [53:0]  sum0,
  output logic [53:0]  sum1,
  output logic [53:0]  sum2,
  output logic         lower_cout,
  output logic [51:0]  lower_bits
);
  logic [24:0] lo_add;
  logic [53:0] hi_sum;

  always_comb begin
    lo_add = {1'b0, vec_s[51:28]} + {1'b0, vec_c[50:27]};
    hi_sum = vec_s[105:52] + vec_c[104:51];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      lower_bits <= {lo_add[23:0], vec_s[27:0]};
      lower_cout <= lo_add[24];
      sum0       <= hi_sum;
      sum1       <= hi_sum + 54'd1;
      sum2       <= hi_sum + 54'd2;
    end
  end

endmodule
