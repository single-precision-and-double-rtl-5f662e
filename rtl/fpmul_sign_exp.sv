// fpmul_sign_exp: sign and exponent processing of the merged multiplier
// (first pipeline stage, combinational).
//
// Two XORs give the product signs: the DP sign and the first SP sign sit at
// bit 63 of both operands and share the first XOR; the second XOR serves the
// second SP product. In DP mode s_l repeats s_h.
//
// Each exponent is the three-operand sum E1 + E2 - bias. As in the source
// design, one level of (3,2) counters reduces the three operands to a sum and
// a carry vector, and one carry-propagate adder adds those two. The 11-bit
// path is shared by the DP product and the first SP product (the SP exponents
// are zero-extended to 11 bits); an 8-bit path serves the second SP product.
// The bias enters the counter as its two's complement (-1023 or -127), which
// is this design's way of feeding the constants 1023/127 of the figure.
//
// Interface: dp selects the mode; a and b are the 64-bit operand words.
// exp_h is 11 bits (only [7:0] is meaningful in SP mode), exp_l 8 bits.
// The result exponents are not checked for overflow or underflow.
// Lint note: the fraction bits of a and b are not read here.
module fpmul_sign_exp (
  input  logic        dp,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        s_h,
  output logic        s_l,
  output logic [10:0] exp_h,
  output logic [7:0]  exp_l
);
  localparam int unsigned DP_BIAS = 1023;
  localparam int unsigned SP_BIAS = 127;

  logic [10:0] eh_a, eh_b, eh_k, cs_h, cc_h;
  logic [7:0]  el_a, el_b, el_k, cs_l, cc_l;

  // Sign processing
  always_comb begin
    s_h = a[63] ^ b[63];
    s_l = dp ? s_h : (a[31] ^ b[31]);
  end

  // Exponent processing: (3,2) counter then adder
  always_comb begin
    eh_a = dp ? a[62:52] : {3'b000, a[62:55]};
    eh_b = dp ? b[62:52] : {3'b000, b[62:55]};
    eh_k = dp ? 11'(-DP_BIAS) : 11'(-SP_BIAS);
    cs_h = eh_a ^ eh_b ^ eh_k;
    cc_h = {((eh_a[9:0] & eh_b[9:0]) | (eh_a[9:0] & eh_k[9:0]) | (eh_b[9:0] & eh_k[9:0])), 1'b0};
    exp_h = cs_h + cc_h;

    el_a = a[30:23];
    el_b = b[30:23];
    el_k = 8'(-SP_BIAS);
    cs_l = el_a ^ el_b ^ el_k;
    cc_l = {((el_a[6:0] & el_b[6:0]) | (el_a[6:0] & el_k[6:0]) | (el_b[6:0] & el_k[6:0])), 1'b0};
    exp_l = cs_l + cc_l;
  end

endmodule
