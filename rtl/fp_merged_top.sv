// fp_merged_top: the merged single/double precision floating-point
// multiplication and addition units, side by side.
//
// The multiplier (fpmul_top) and the adder (fpadd_top) are independent
// pipelines sharing clock and reset; each takes 64-bit operands that hold
// either one binary64 number or two binary32 numbers {sp_one, sp_two}.
//   Multiplier: in_ready handshake; SP result after 6 clocks, DP after 9; a
//               DP operation occupies the mantissa multipliers for two clocks.
//   Adder:      no stall, one operation per clock, result after 6 clocks.
// Putting both units in one top is this design's choice (the source
// describes them as two separate units).
module fp_merged_top (
  input  logic        clk,
  input  logic        rst_n,
  // multiplier
  input  logic        mul_in_valid,
  output logic        mul_in_ready,
  input  logic        mul_in_dp,
  input  logic [63:0] mul_in_a,
  input  logic [63:0] mul_in_b,
  output logic        mul_out_valid,
  output logic        mul_out_dp,
  output logic [63:0] mul_out_result,
  // adder
  input  logic        add_in_valid,
  input  logic        add_in_dp,
  input  logic [1:0]  add_in_op,
  input  logic [63:0] add_in_a,
  input  logic [63:0] add_in_b,
  output logic        add_out_valid,
  output logic        add_out_dp,
  output logic [63:0] add_out_result
);
  fpmul_top u_mul (
    .clk, .rst_n,
    .in_valid(mul_in_valid), .in_ready(mul_in_ready), .in_dp(mul_in_dp),
    .in_a(mul_in_a), .in_b(mul_in_b),
    .out_valid(mul_out_valid), .out_dp(mul_out_dp), .out_result(mul_out_result)
  );

  fpadd_top u_add (
    .clk, .rst_n,
    .in_valid(add_in_valid), .in_dp(add_in_dp), .in_op(add_in_op),
    .in_a(add_in_a), .in_b(add_in_b),
    .out_valid(add_out_valid), .out_dp(add_out_dp), .out_result(add_out_result)
  );
endmodule
