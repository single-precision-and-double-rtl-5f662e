// fpadd_far_alu: FAR-path ALU of the merged adder (pipeline stage 4,
// registered outputs).
//
// The larger mantissa A = {1, m1, 00} and the aligned smaller mantissa b55
// (with its sticky bits) are added or subtracted in one merged 60-bit
// compound adder that yields both sum and sum+1, where "+1" is one unit in
// the L (result LSB) position of each lane. The adder vector is
//   [59:58] extension (carry-out / sign of the upper lane)
//   [57:32] upper lane, b55[54:29]         (first SP number, or DP high bits)
//   [31]    upper sticky slot (stk1 in SP mode)
//   [30]    lane-boundary slot
//   [29:1]  lower lane, b55[28:0]          (second SP number, or DP low bits)
//   [0]     lower sticky slot (stk2)
// In DP mode both slots at [31:30] are set to propagate, so the lower lane's
// carry selects the upper lane's sum or sum+1 as in a split compound adder.
// In SP mode the boundary slot kills the carry for an addition and generates
// the +1 of the upper lane's two's complement for a subtraction, so the two
// lanes work independently. Subtraction inverts the smaller operand, sticky
// slot included, and adds 1 at bit 0 of each lane. Because the sticky bit
// takes part in the subtraction, the guard, round and sticky bits of the
// difference come out of the same adder.
// Using one adder with slot bits (instead of two separately wired 27-bit
// compound adders) is this design's way of building the lane split.
module fpadd_far_alu (
  input  logic        clk,
  input  logic        dp,
  input  logic        eop1,
  input  logic        eop2,
  input  logic [51:0] m1,
  input  logic [54:0] b55,
  input  logic        stk1,
  input  logic        stk2,
  output logic [59:0] sum0,
  output logic [59:0] sum1
);
  logic [54:0] a55;
  logic [59:0] ax, bx, inc;
  logic        eop_lo;

  always_comb begin
    a55    = {1'b1, m1, 2'b00};
    eop_lo = dp ? eop1 : eop2;
    // operand A
    ax = {2'b00, a55[54:29], 1'b0, 1'b0, a55[28:0], 1'b0};
    // operand B, inverted for subtraction lane by lane
    bx[59:58] = eop1 ? 2'b11 : 2'b00;
    bx[57:32] = eop1 ? ~b55[54:29] : b55[54:29];
    bx[29:1]  = eop_lo ? ~b55[28:0] : b55[28:0];
    bx[0]     = eop_lo ? ~stk2 : stk2;
    if (dp) begin
      ax[31] = 1'b1; bx[31] = 1'b0;        // propagate
      ax[30] = 1'b1; bx[30] = 1'b0;        // propagate
      inc = 60'd1 << 3;
    end else begin
      ax[31] = 1'b0; bx[31] = eop1 ? ~stk1 : stk1;
      ax[30] = eop1; bx[30] = eop1;        // generate (+1) or kill
      inc = (60'd1 << 3) | (60'd1 << 34);
    end
  end

  always_ff @(posedge clk) begin
    sum0 <= ax + bx + {59'd0, eop_lo};
    sum1 <= ax + bx + {59'd0, eop_lo} + inc;
  end

endmodule
