// tb_fpadd_norm_shifter: unit test of the NEAR-path normalisation shifter.
// A random magnitude per lane is applied with a shift amount equal to its
// true leading-zero count or one less (as the anticipator delivers it). One
// clock later the fraction must be the bits below the leading one, the
// exponent e - (true leading-zero count), and zero1/zero2 must flag zero
// lanes. DP: 55-bit magnitude, leading position 54; SP: upper lane [54:28]
// (hidden bit at 54, fraction [53:31]), lower lane [27:0] (hidden bit at
// 25, fraction [24:2]); as in a real NEAR difference, bit 0 of the lower
// lane is zero.
module tb_fpadd_norm_shifter;
  logic        clk = 1'b0, dp, zero1, zero2;
  logic [54:0] mag;
  logic [5:0]  shn1;
  logic [4:0]  shn2;
  logic [10:0] e1, near_e1;
  logic [7:0]  e2, near_e2;
  logic [51:0] mant;
  int          checks = 0, failures = 0, n_corr = 0, n_zero = 0;

  fpadd_norm_shifter dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic dp; logic [51:0] m; logic [10:0] e1; logic [7:0] e2; logic z1, z2; } exp_t;

  initial begin
    exp_t        q[$], x;
    logic [54:0] v;
    logic [26:0] u;
    logic [25:0] l;
    int          z, z2;
    dp = 0; mag = 0; shn1 = 0; shn2 = 0; e1 = 0; e2 = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (q.size() == 1) begin
        x = q.pop_front();
        checks++;
        if (zero1 !== x.z1 || zero2 !== x.z2 ||
            (x.dp && !x.z1 && (mant !== x.m || near_e1 !== x.e1)) ||
            (!x.dp && !x.z1 && (mant[51:29] !== x.m[51:29] || near_e1 !== x.e1)) ||
            (!x.dp && !x.z2 && (mant[22:0] !== x.m[22:0] || near_e2 !== x.e2))) begin
          failures++;
          if (failures < 10) $display("mismatch dp=%0d: mant %h/%h e %h/%h shn %0d %0d", x.dp, mant, x.m, near_e1, x.e1, shn1, shn2);
        end
      end
      dp = 1'($urandom());
      e1 = dp ? 11'($urandom_range(100, 1900)) : 11'($urandom_range(60, 190));
      e2 = 8'($urandom_range(60, 190));
      x.dp = dp; x.m = '0;
      if (dp) begin
        z = int'($urandom_range(0, 54));
        v = {$urandom(), $urandom()};
        v[54] = 1'b1;
        v = (z == 54) ? 55'd1 << 0 | 55'd0 : v >> z;
        if ($urandom_range(0, 19) == 0) begin v = '0; z = 54; end
        mag = v;
        x.z1 = (v == '0); x.z2 = x.z1;
        shn1 = (z > 0 && $urandom_range(0, 1) == 1) ? 6'(z - 1) : 6'(z);
        if (shn1 != 6'(z)) n_corr++;
        x.m  = 52'(v << z >> 2);
        x.e1 = 11'(int'(e1) - z);
        x.e2 = '0;
      end else begin
        z  = int'($urandom_range(0, 24));
        u  = {1'b1, 23'($urandom()), 3'b000} >> z;
        z2 = int'($urandom_range(0, 24));
        l  = {1'b1, 23'($urandom()), 2'b00} >> z2;
        l[0] = 1'b0;                      // a NEAR difference has no bit below bit 1
        if ($urandom_range(0, 19) == 0) u = '0;
        if ($urandom_range(0, 19) == 0) l = '0;
        mag = {u, 2'b00, l};
        x.z1 = (u == '0); x.z2 = (l == '0);
        shn1 = (z > 0 && $urandom_range(0, 1) == 1) ? 6'(z - 1) : 6'(z);
        shn2 = (z2 > 0 && $urandom_range(0, 1) == 1) ? 5'(z2 - 1) : 5'(z2);
        if (shn1 != 6'(z) || shn2 != 5'(z2)) n_corr++;
        x.m[51:29] = 23'(u << z >> 3);
        x.m[22:0]  = 23'(l << z2 >> 2);
        x.e1 = {3'b000, 8'(int'(e1[7:0]) - z)};
        x.e2 = 8'(int'(e2) - z2);
      end
      if (x.z1 || x.z2) n_zero++;
      q.push_back(x);
    end
    if (n_corr == 0 || n_zero == 0) begin failures++; $display("correction or zero never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
