// fpadd_lzac: leading zero anticipation and counting for the NEAR path of
// the merged adder (pipeline stages 2, 3 and 4, registered after each).
//
// Anticipation: from the NEAR operands A and ~B (fp_pkg::near_operands) an
// indicator f is formed without waiting for the subtraction. With T = A^~B,
// G = A&~B, Z = ~A&~~B, and i+1 the more significant neighbour:
//   f[msb] = ~T[msb] & T[msb-1]
//   f[i]   = T[i+1]&(G[i]&~Z[i-1] | Z[i]&~G[i-1]) | ~T[i+1]&(Z[i]&~Z[i-1] | G[i]&~G[i-1])
// evaluated per lane (DP: [54:1]; SP: [54:30] and [25:1]); the position below
// a lane's LSB is taken as Z, and the lane's LSB indicator bit is forced to 1
// so that a difference of one unit is counted too. The first one of f marks
// the leading digit of |A - B| exactly or one position too far left; the
// normalisation shifter corrects the second case. These boundary conventions
// are this design's choice.
// Counting (stage 2): eleven 5-bit priority encoders in three groups:
// group 1 on f[54:30], group 2 on f[29:25], group 3 on f[24:0] in DP mode
// and on f[25:1] (the second SP lane) in SP mode.
// Stage 3: one SP priority encoder per outer group gives lzd_spone and
// lzd_sptwo (offset + code); the group valid bits are ORed.
// Stage 4: the DP priority encoder (offsets 0, 25, 30, 54) gives lzd_dp, and
//   SP: shn1 = {0, lzd_spone}, shn2 = lzd_sptwo;  DP: shn1 = lzd_dp, shn2 = lzd_dp[4:0].
// Lint note: the lza function returns a full 55-bit vector; only the bits
// of its own lane are taken from each of the SP results f_sp1 and f_sp2.
module fpadd_lzac (
  input  logic        clk,
  input  logic        dp,
  input  logic [51:0] m1,
  input  logic [51:0] m2,
  input  logic        d1,
  input  logic        d2,
  output logic [5:0]  shn1,
  output logic [4:0]  shn2
);
  import fp_pkg::*;

  function automatic logic [54:0] lza(input logic [54:0] a, input logic [54:0] b, input int hi, input int lo);
    logic [54:0] f, t, g, z;
    logic        gm, zm;
    t = a ^ b; g = a & b; z = ~a & ~b;
    f = '0;
    f[hi] = ~t[hi] & t[hi-1];
    for (int i = 0; i < 55; i++) begin
      if (i >= lo && i < hi) begin
        gm = (i == lo) ? 1'b0 : g[(i == 0) ? 0 : i - 1];
        zm = (i == lo) ? 1'b1 : z[(i == 0) ? 0 : i - 1];
        f[i] = (t[i+1] & ((g[i] & ~zm) | (z[i] & ~gm))) | (~t[i+1] & ((z[i] & ~zm) | (g[i] & ~gm)));
      end
    end
    f[lo] = 1'b1;
    return f;
  endfunction

  // ---------------- stage 2 ----------------
  logic [54:0] a, b, bn, f, f_dp, f_sp1, f_sp2;
  logic [24:0] ind3;
  logic [10:0] pv;
  logic [2:0]  pc [11];
  logic [10:0] pv_q;
  logic [2:0]  pc_q [11];
  logic        dp2;

  always_comb begin
    {a, b} = near_operands(dp, m1, m2, d1, d2);
    bn    = ~b;
    f_dp  = lza(a, bn, 54, 1);
    f_sp1 = lza(a, bn, 54, 30);
    f_sp2 = lza(a, bn, 25, 1);
    f     = dp ? f_dp : {f_sp1[54:30], 5'b0, f_sp2[24:0]};
    ind3  = dp ? f[24:0] : f_sp2[25:1];
  end

  for (genvar k = 0; k < 5; k++) begin : g_grp1
    fpadd_pe5 u_pe (.ind(f[54 - 5*k -: 5]), .valid(pv[k]), .code(pc[k]));
  end
  fpadd_pe5 u_pe_mid (.ind(f[29:25]), .valid(pv[5]), .code(pc[5]));
  for (genvar k = 0; k < 5; k++) begin : g_grp3
    fpadd_pe5 u_pe (.ind(ind3[24 - 5*k -: 5]), .valid(pv[6+k]), .code(pc[6+k]));
  end

  always_ff @(posedge clk) begin
    pv_q <= pv;
    pc_q <= pc;
    dp2  <= dp;
  end

  // ---------------- stage 3 ----------------
  function automatic logic [4:0] sp_pe(input logic [4:0] v, input logic [14:0] c);
    // v[4] / c[14:12] belong to the most significant encoder
    logic [4:0] offset;
    logic [2:0] code;
    casez (v)
      5'b1????: begin offset = 5'd0;  code = c[14:12]; end
      5'b01???: begin offset = 5'd5;  code = c[11:9];  end
      5'b001??: begin offset = 5'd10; code = c[8:6];   end
      5'b0001?: begin offset = 5'd15; code = c[5:3];   end
      5'b00001: begin offset = 5'd20; code = c[2:0];   end
      default:  begin offset = 5'd25; code = 3'd0;     end
    endcase
    return offset + {2'b00, code};
  endfunction

  logic [4:0] lzd_spone, lzd_sptwo, lzd_spone_q, lzd_sptwo_q;
  logic [2:0] lzd_mid_q;
  logic       valid_gone_q, valid_gmid_q, valid_gtwo_q, dp3;

  always_comb begin
    lzd_spone = sp_pe({pv_q[0], pv_q[1], pv_q[2], pv_q[3], pv_q[4]},
                      {pc_q[0], pc_q[1], pc_q[2], pc_q[3], pc_q[4]});
    lzd_sptwo = sp_pe({pv_q[6], pv_q[7], pv_q[8], pv_q[9], pv_q[10]},
                      {pc_q[6], pc_q[7], pc_q[8], pc_q[9], pc_q[10]});
  end

  always_ff @(posedge clk) begin
    lzd_spone_q  <= lzd_spone;
    lzd_sptwo_q  <= lzd_sptwo;
    lzd_mid_q    <= pc_q[5];
    valid_gone_q <= |pv_q[4:0];
    valid_gmid_q <= pv_q[5];
    valid_gtwo_q <= |pv_q[10:6];
    dp3          <= dp2;
  end

  // ---------------- stage 4 ----------------
  logic [5:0] offset_dp, lzd_dp;
  logic [4:0] code_dp;

  always_comb begin
    if (valid_gone_q)      begin offset_dp = 6'd0;  code_dp = lzd_spone_q; end
    else if (valid_gmid_q) begin offset_dp = 6'd25; code_dp = {2'b00, lzd_mid_q}; end
    else if (valid_gtwo_q) begin offset_dp = 6'd30; code_dp = lzd_sptwo_q; end
    else                   begin offset_dp = 6'd54; code_dp = 5'd0; end
    lzd_dp = offset_dp + {1'b0, code_dp};
  end

  always_ff @(posedge clk) begin
    shn1 <= dp3 ? lzd_dp : {1'b0, lzd_spone_q};
    shn2 <= dp3 ? lzd_dp[4:0] : lzd_sptwo_q;
  end

endmodule
