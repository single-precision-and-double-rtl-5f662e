// fpadd_align_shifter: FAR-path alignment shifter of the merged adder
// (pipeline stages 2 and 3, registered at the end of each).
//
// The smaller operand's mantissa m2 gets its hidden one and two zero bits
// (guard and round positions): x = {1, m2, 00}, 55 bits. In SP mode this
// places the first SP significand at x[54:31] with its guard/round bits at
// x[30:29], and the second at x[25:2] with guard/round at x[1:0].
// The 55-bit shifter is split into a 26-bit L-shifter (x[54:29]) and a 29-bit
// R-shifter (x[28:0]):
//   pre-shift : in DP mode sha1[5] shifts the whole vector by 32 first;
//   levels    : one shift-amount bit per level (1, 2, 4, 8, 16). The
//               L-shifter uses sha1[4:0], the R-shifter sha2 (= sha1[4:0] in
//               DP mode). In DP mode the bits leaving the L-shifter enter the
//               R-shifter; in SP mode zeros enter both.
//   sticky    : ORs of the bits shifted out, kept per lane: stk1 for the
//               first SP operation, stk2 for the second SP or the DP one.
// Pipeline registers sit after the pre-shift and the first level, as in the
// source design; the other four levels are in stage 3.
// Interface: m2/sha1/sha2/dp are the stage-1 registers; b55/stk1/stk2 are
// valid two clocks later.
module fpadd_align_shifter (
  input  logic        clk,
  input  logic        dp,
  input  logic [51:0] m2,
  input  logic [5:0]  sha1,
  input  logic [4:0]  sha2,
  output logic [54:0] b55,
  output logic        stk1,
  output logic        stk2
);
  // one level of the split shifter
  typedef struct packed {
    logic [25:0] l;
    logic [28:0] r;
    logic        st1;
    logic        st2;
  } lvl_t;

  function automatic lvl_t shift_level(input logic dp_m, input int k, input logic do_l, input logic do_r,
                                       input lvl_t x);
    lvl_t        o;
    logic [54:0] lr_s;
    o = x;
    if (dp_m) begin
      if (do_l) begin
        lr_s  = {x.l, x.r} >> k;
        o.st2 = x.st2 | (|(x.r << (29 - k)));
        o.l   = lr_s[54:29];
        o.r   = lr_s[28:0];
      end
    end else begin
      if (do_l) begin
        o.st1 = x.st1 | (|(x.l << (26 - k)));
        o.l   = x.l >> k;
      end
      if (do_r) begin
        o.st2 = x.st2 | (|(x.r << (29 - k)));
        o.r   = x.r >> k;
      end
    end
    return o;
  endfunction

  // stage 2
  logic [54:0] x, x_ps;
  lvl_t        s1_d, s1_q;
  logic        st1_d, st2_d, dp_q;
  logic [3:0]  a1_q, a2_q;

  always_comb begin
    x = {1'b1, m2, 2'b00};
    st1_d = 1'b0;
    st2_d = 1'b0;
    if (dp && sha1[5]) begin
      x_ps  = x >> 32;
      st2_d = |x[31:0];
    end else begin
      x_ps  = x;
    end
    s1_d = shift_level(dp, 1, sha1[0], sha2[0], '{l: x_ps[54:29], r: x_ps[28:0], st1: st1_d, st2: st2_d});
  end

  always_ff @(posedge clk) begin
    s1_q  <= s1_d;
    dp_q  <= dp;
    a1_q  <= sha1[4:1];
    a2_q  <= sha2[4:1];
  end

  // stage 3
  lvl_t s2, s4, s8, s16;

  always_comb begin
    s2  = shift_level(dp_q, 2,  a1_q[0], a2_q[0], s1_q);
    s4  = shift_level(dp_q, 4,  a1_q[1], a2_q[1], s2);
    s8  = shift_level(dp_q, 8,  a1_q[2], a2_q[2], s4);
    s16 = shift_level(dp_q, 16, a1_q[3], a2_q[3], s8);
  end

  always_ff @(posedge clk) begin
    b55  <= {s16.l, s16.r};
    stk1 <= s16.st1;
    stk2 <= s16.st2;
  end

endmodule
