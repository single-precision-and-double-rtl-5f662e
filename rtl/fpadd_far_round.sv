// fpadd_far_round: FAR-path rounding and 1-bit normalisation of the merged
// adder (pipeline stage 5, registered outputs).
//
// Each lane (DP, or the two SP lanes) is read from sum and sum+1 of the FAR
// ALU as a vector v whose bit 0 is the sticky bit S, bits 1, 2, 3, 4 are R, G,
// L and N, bit M is the significand MSB and bits M+1, M+2 are the carry-out
// (S_add) and sign. For an addition, S_add = 1 means a 1-bit right shift; for
// a subtraction, a zero at bit M (the S_sub position) means a 1-bit left
// shift. Round to nearest even, decided on "sum":
//   add, S_add = 0 : round = G & (L | R | S)      (LSB L)
//   add, S_add = 1 : round = L & (N | G | R | S)  (LSB N; L is 1 when rounding)
//   sub, bit M = 1 : round = G & (L | R | S)      (LSB L)
//   sub, bit M = 0 : round = R & (G | S)          (LSB G after the left shift)
// Rounding selects sum+1, except in the last case with G = 0, where the guard
// bit is only flipped; in that case with G = 1 sum+1 is taken and G is flipped
// to 0. Normalisation is decided on the selected value, since rounding can
// carry into a new binade.
// u_n flags a lane whose FAR result is unusable (subtraction with a negative
// result, or one that needs more than one left shift); the NEAR path result is
// then taken. The rules follow the source design's rounding tables.
// Output mantissas use the merged layout: DP fraction, or {frac1, 000000, frac2}.
// Lint note: bit 30 of the sums (the SP boundary slot) never belongs to a
// lane and is not read; es1/es2 are 11-bit temporaries of which only the
// low 8 bits form an SP exponent.
module fpadd_far_round (
  input  logic        clk,
  input  logic        dp,
  input  logic        eop1,
  input  logic        eop2,
  input  logic [10:0] e1,
  input  logic [7:0]  e2,
  input  logic [59:0] sum0,
  input  logic [59:0] sum1,
  output logic [51:0] mant,
  output logic [10:0] far_e1,
  output logic [7:0]  far_e2,
  output logic        u_n1,
  output logic        u_n2
);
  typedef struct packed {
    logic [51:0] mant;
    logic [1:0]  adj;     // 0: none, 1: +1, 2: -1
    logic        u_n;
  } lane_t;

  function automatic lane_t lane_round(input logic [57:0] v0, input logic [57:0] v1,
                                       input int m, input logic sub);
    lane_t       o;
    logic        s_b, r_b, g_b, l_b, n_b, top, rnd, use1, gflip;
    logic [57:0] v, mask;
    s_b = v0[0]; r_b = v0[1]; g_b = v0[2]; l_b = v0[3]; n_b = v0[4];
    mask = (58'd1 << (m - 3)) - 58'd1;
    if (!sub) begin
      top  = v0[m+1];
      rnd  = top ? (l_b & (n_b | g_b | r_b | s_b)) : (g_b & (l_b | r_b | s_b));
      use1 = rnd;
      gflip = 1'b0;
    end else begin
      top  = v0[m];
      rnd  = top ? (g_b & (l_b | r_b | s_b)) : (r_b & (g_b | s_b));
      use1 = rnd & (top | g_b);
      gflip = rnd & ~top;
    end
    v = use1 ? v1 : v0;
    o.u_n = sub & (v0[m+2] | (~v0[m] & ~v0[m-1]));
    if (!sub) begin
      if (v[m+1]) begin o.mant = 52'((v >> 4) & mask); o.adj = 2'd1; end
      else        begin o.mant = 52'((v >> 3) & mask); o.adj = 2'd0; end
    end else begin
      if (v[m])   begin o.mant = 52'((v >> 3) & mask); o.adj = 2'd0; end
      else        begin o.mant = 52'(((v >> 2) ^ {57'd0, gflip}) & mask); o.adj = 2'd2; end
    end
    return o;
  endfunction

  function automatic logic [10:0] apply11(input logic [10:0] e, input logic [1:0] adj);
    return (adj == 2'd1) ? e + 11'd1 : (adj == 2'd2) ? e - 11'd1 : e;
  endfunction

  lane_t       ld, l1, l2;
  logic [57:0] dv0, dv1;
  logic [10:0] ed, es1, es2;

  always_comb begin
    dv0 = {sum0[59:32], sum0[29:0]};
    dv1 = {sum1[59:32], sum1[29:0]};
    ld  = lane_round(dv0, dv1, 55, eop1);
    l1  = lane_round({29'd0, sum0[59:32], sum0[31]}, {29'd0, sum1[59:32], sum1[31]}, 26, eop1);
    l2  = lane_round({28'd0, sum0[29:0]}, {28'd0, sum1[29:0]}, 26, eop2);
    ed  = apply11(e1, ld.adj);
    es1 = apply11({3'b000, e1[7:0]}, l1.adj);
    es2 = apply11({3'b000, e2}, l2.adj);
  end

  always_ff @(posedge clk) begin
    if (dp) begin
      mant   <= ld.mant;
      far_e1 <= ed;
      far_e2 <= ed[7:0];
      u_n1   <= ld.u_n;
      u_n2   <= ld.u_n;
    end else begin
      mant   <= {l1.mant[22:0], 6'b000000, l2.mant[22:0]};
      far_e1 <= {3'b000, es1[7:0]};
      far_e2 <= es2[7:0];
      u_n1   <= l1.u_n;
      u_n2   <= l2.u_n;
    end
  end

endmodule
