// fpadd_norm_shifter: NEAR-path normalisation of the merged adder (pipeline
// stage 5, registered outputs).
//
// The NEAR magnitude (55-bit layout of fpadd_near_alu) is shifted left by the
// anticipated leading-zero count. DP mode: the whole vector by shn1 (0..54),
// done as a 32-bit pre-shift followed by the 16/8/4/2/1 levels. SP mode: the
// upper lane mag[54:28] by shn1[4:0] and the lower lane mag[27:1] by shn2,
// each as a 27-bit shifter. The anticipation may be one position short, so a
// final 1-bit correction shift is applied when the lane MSB is still 0
// (DP v[54], SP1 up[26], SP2 lo[24]). The NEAR result is exact, so no
// rounding is done: the fraction is read directly (DP v[53:2], SP1 up[25:3],
// SP2 lo[23:1]) and the exponent becomes e - shn - correction.
// zero1/zero2 flag a lane whose difference is exactly zero.
// The split into pre-shift and levels follows the source design; the lane
// positions and the correction step are this design's choice.
module fpadd_norm_shifter (
  input  logic        clk,
  input  logic        dp,
  input  logic [54:0] mag,
  input  logic [5:0]  shn1,
  input  logic [4:0]  shn2,
  input  logic [10:0] e1,
  input  logic [7:0]  e2,
  output logic [51:0] mant,
  output logic [10:0] near_e1,
  output logic [7:0]  near_e2,
  output logic        zero1,
  output logic        zero2
);
  logic [54:0] v, vp;
  logic [26:0] up, lo;
  logic        c_dp, c_up, c_lo;
  logic [51:0] mant_d;
  logic [10:0] e1_d;
  logic [7:0]  e2_d;
  logic        z1_d, z2_d;

  always_comb begin
    // DP: pre-shift by 32, then the remaining five levels
    vp = shn1[5] ? {mag[22:0], 32'd0} : mag;
    v  = vp << shn1[4:0];
    c_dp = ~v[54];
    if (c_dp) v = v << 1;
    // SP lanes
    up = mag[54:28] << shn1[4:0];
    c_up = ~up[26];
    if (c_up) up = up << 1;
    lo = mag[27:1] << shn2;
    c_lo = ~lo[24];
    if (c_lo) lo = lo << 1;

    if (dp) begin
      mant_d = v[53:2];
      e1_d   = e1 - {5'd0, shn1} - {10'd0, c_dp};
      e2_d   = e1_d[7:0];
      z1_d   = (mag == '0);
      z2_d   = z1_d;
    end else begin
      mant_d = {up[25:3], 6'b000000, lo[23:1]};
      e1_d   = {3'b000, e1[7:0] - {3'd0, shn1[4:0]} - {7'd0, c_up}};
      e2_d   = e2 - {3'd0, shn2} - {7'd0, c_lo};
      z1_d   = (mag[54:28] == '0);
      z2_d   = (mag[27:0] == '0);
    end
  end

  always_ff @(posedge clk) begin
    mant    <= mant_d;
    near_e1 <= e1_d;
    near_e2 <= e2_d;
    zero1   <= z1_d;
    zero2   <= z2_d;
  end

endmodule
