// fpadd_setup: dual-path setup, the first pipeline stage of the merged adder
// (registered outputs).
//
// Exponent subtract I serves the DP operation and the first SP operation: the
// SP exponents are zero-extended to 11 bits, both differences e11-e21 and
// e21-e11 are formed, the borrow gives less1, and the positive difference is
// the shift amount sha1. Exponent subtract II does the same with 8 bits for
// the second SP operation (sha2, less2); in DP mode sha2 = sha1[4:0] and
// less2 = less1. The shift amounts saturate (63 for DP, 31 for SP), which is
// this design's choice so that large differences shift everything into the
// sticky bit.
//
// Mantissas: in SP mode the two 23-bit fractions of a word are merged into
// the 52-bit DP fraction field as {frac1, 000001, frac2}; the 1 is the hidden
// bit of the second SP number. Each 52-bit value is split into a 26-bit upper
// and a 26-bit lower part, the upper parts are swapped by less1 and the lower
// parts by less2, so m1 always holds the operand with the larger exponent.
//
// Sign and effective operation (op = 0 add, 1 subtract; op[1] for DP/first SP,
// op[0] for second SP):
//   s   = less ? (s2 ^ op) : s1
//   eop = s1 ^ s2 ^ op
// The sign is that of the larger-exponent operand; the NEAR path flips it when
// equal exponents give a negative difference.
// Interface: operandone/operandtwo in the layout of fp_pkg; e1 is the larger
// exponent of lane 1 (11 bits, [7:0] in SP mode) and e2 that of lane 2.
module fpadd_setup (
  input  logic        clk,
  input  logic        dp,
  input  logic [1:0]  op,
  input  logic [63:0] operandone,
  input  logic [63:0] operandtwo,
  output logic        dp_q,
  output logic [10:0] e1,
  output logic [7:0]  e2,
  output logic [5:0]  sha1,
  output logic [4:0]  sha2,
  output logic [51:0] m1,
  output logic [51:0] m2,
  output logic        s1,
  output logic        s2,
  output logic        eop1,
  output logic        eop2
);
  logic [10:0] e11, e21, e1_d, sha1_tmp;
  logic [11:0] d12;
  logic [10:0] d21;
  logic [7:0]  e12, e22, e2_d, sha2_tmp;
  logic [8:0]  f12;
  logic [7:0]  f21;
  logic        less1, less2, less2_tmp;
  logic [5:0]  sha1_d;
  logic [4:0]  sha2_d;
  logic [51:0] m1p, m2p, m1_d, m2_d;
  logic        s11, s21, s12, s22, s1_d, s2_d, eop1_d, eop2_d, b1, b2;

  always_comb begin
    // exponent subtract I
    e11 = dp ? operandone[62:52] : {3'b000, operandone[62:55]};
    e21 = dp ? operandtwo[62:52] : {3'b000, operandtwo[62:55]};
    d12 = {1'b0, e11} - {1'b0, e21};
    d21 = e21 - e11;
    less1    = d12[11];
    e1_d     = less1 ? e21 : e11;
    sha1_tmp = less1 ? d21 : d12[10:0];
    if (dp) sha1_d = (sha1_tmp > 11'd63) ? 6'd63 : sha1_tmp[5:0];
    else    sha1_d = (sha1_tmp > 11'd31) ? 6'd31 : sha1_tmp[5:0];

    // exponent subtract II
    e12 = operandone[30:23];
    e22 = operandtwo[30:23];
    f12 = {1'b0, e12} - {1'b0, e22};
    f21 = e22 - e12;
    less2_tmp = f12[8];
    less2     = dp ? less1 : less2_tmp;
    e2_d      = less2 ? e22 : e12;
    sha2_tmp  = less2 ? f21 : f12[7:0];
    sha2_d    = dp ? sha1_d[4:0] : ((sha2_tmp > 8'd31) ? 5'd31 : sha2_tmp[4:0]);

    // mantissa merge and swap
    m1p = dp ? operandone[51:0] : {operandone[54:32], 6'b000001, operandone[22:0]};
    m2p = dp ? operandtwo[51:0] : {operandtwo[54:32], 6'b000001, operandtwo[22:0]};
    m1_d = {less1 ? m2p[51:26] : m1p[51:26], less2 ? m2p[25:0] : m1p[25:0]};
    m2_d = {less1 ? m1p[51:26] : m2p[51:26], less2 ? m1p[25:0] : m2p[25:0]};

    // sign and effective operation
    s11 = operandone[63];
    s21 = operandtwo[63];
    s12 = operandone[31];
    s22 = operandtwo[31];
    b1  = s21 ^ op[1];
    b2  = s22 ^ op[0];
    s1_d   = less1 ? b1 : s11;
    eop1_d = s11 ^ b1;
    s2_d   = dp ? s1_d   : (less2 ? b2 : s12);
    eop2_d = dp ? eop1_d : (s12 ^ b2);
  end

  always_ff @(posedge clk) begin
    dp_q <= dp;
    e1   <= e1_d;
    e2   <= e2_d;
    sha1 <= sha1_d;
    sha2 <= sha2_d;
    m1   <= m1_d;
    m2   <= m2_d;
    s1   <= s1_d;
    s2   <= s2_d;
    eop1 <= eop1_d;
    eop2 <= eop2_d;
  end

endmodule
