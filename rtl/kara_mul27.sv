// kara_mul27: pipelined 27 x 27 unsigned multiplier built from three small
// signed products by the Karatsuba method, the way the source design maps it
// onto three 25x18 DSP slices.
//
//   a = ah*2^13 + al,  b = bh*2^13 + bl   (ah, bh: 14 bits; al, bl: 13 bits)
//   M1 = ah*bh,  M2 = (ah-al)*(bh-bl),  M3 = al*bl
//   a*b = M1*2^26 + (M1 + M3 - M2)*2^13 + M3
//
// Pipeline (4 register levels, one result per clock):
//   1  input registers: halves and the pre-subtracted differences ah-al, bh-bl
//   2  product registers: M1, M2 (signed 15x15), M3
//   3  cascade registers: M1+M3 (second slice, PCIN + A*B) and
//      M1+M3-M2 (third slice, PCIN - A*B), with M1 kept alongside
//   4  output register: M3 recovered as (M1+M3) - M1 by a fabric subtractor,
//      then the three terms shifted and added into the 54-bit product
// The two pre-subtractors and the final combination are fabric logic; their
// exact register placement around the slices is this design's choice.
// en gates every register (held when low); p is valid 4 cycles after a/b.
module kara_mul27 (
  input  logic        clk,
  input  logic        en,
  input  logic [26:0] a,
  input  logic [26:0] b,
  output logic [53:0] p
);
  // stage 1
  logic        [13:0] ah_q, bh_q;
  logic        [12:0] al_q, bl_q;
  logic signed [14:0] da_q, db_q;
  // stage 2
  logic        [27:0] m1_q;
  logic signed [29:0] m2_q;
  logic        [25:0] m3_q;
  // stage 3
  logic        [27:0] m1_q3;
  logic        [28:0] m13_q;    // M1 + M3
  logic        [28:0] mid_q;    // M1 + M3 - M2 (= ah*bl + al*bh, never negative)

  always_ff @(posedge clk) begin
    if (en) begin
      ah_q <= a[26:13];
      al_q <= a[12:0];
      bh_q <= b[26:13];
      bl_q <= b[12:0];
      da_q <= $signed({1'b0, a[26:13]}) - $signed({2'b00, a[12:0]});
      db_q <= $signed({1'b0, b[26:13]}) - $signed({2'b00, b[12:0]});

      m1_q <= ah_q * bh_q;
      m2_q <= da_q * db_q;
      m3_q <= al_q * bl_q;

      m1_q3 <= m1_q;
      m13_q <= 29'(m1_q) + 29'(m3_q);
      mid_q <= 29'($signed({1'b0, m1_q}) + $signed({3'b000, m3_q}) - m2_q);

      p <= {m1_q3, 26'b0} + {12'b0, mid_q, 13'b0} + 54'(m13_q - 29'(m1_q3));
    end
  end

endmodule
