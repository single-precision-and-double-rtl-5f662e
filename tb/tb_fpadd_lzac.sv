// tb_fpadd_lzac: unit test of the leading zero anticipator and counter.
// Random NEAR operands (often with many equal leading bits) are applied
// every clock. Three clocks later each lane's shift amount must be the true
// leading-zero count of |A - B| in that lane, or one less (the anticipation
// may place the leading one one position too high). Lanes whose difference
// is zero are not checked. DP lane: 55 bits from bit 54; SP lanes: [54:30]
// with the leading position counted from bit 54, and [25:1] from bit 25.
module tb_fpadd_lzac;
  import fp_pkg::*;
  logic        clk = 1'b0, dp, d1, d2;
  logic [51:0] m1, m2;
  logic [5:0]  shn1;
  logic [4:0]  shn2;
  int          checks = 0, failures = 0, n_exact = 0, n_short = 0, n_big = 0;

  fpadd_lzac dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic dp; int z1, z2; } exp_t;   // -1: zero difference

  function automatic int lzc(input logic [54:0] v, input int top);
    for (int i = top; i >= 0; i--) if (v[i]) return top - i;
    return -1;
  endfunction

  task automatic cmp(input int got, input int z, input string what);
    if (z < 0) return;
    checks++;
    if (got == z) n_exact++;
    else if (got == z - 1) n_short++;
    else begin
      failures++;
      if (failures < 10) $display("%s: count %0d, true %0d", what, got, z);
    end
    if (z > 20) n_big++;
  endtask

  initial begin
    exp_t        q[$], x;
    logic [54:0] a, b, dv;
    logic [26:0] du;
    logic [27:0] dl;
    dp = 0; d1 = 0; d2 = 0; m1 = 0; m2 = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (q.size() == 3) begin
        x = q.pop_front();
        if (x.dp) cmp(int'(shn1), x.z1, "dp");
        else begin cmp(int'(shn1), x.z1, "sp1"); cmp(int'(shn2), x.z2, "sp2"); end
      end
      dp = 1'($urandom());
      d1 = ($urandom_range(0, 2) == 0);
      d2 = dp ? d1 : ($urandom_range(0, 2) == 0);
      m1 = {$urandom(), 20'($urandom())};
      m2 = m1;
      for (int k = 0; k < 52; k++) if ($urandom_range(0, 51) < 6) m2[k] = ~m2[k];
      if ($urandom_range(0, 2) == 0) m2 = {$urandom(), 20'($urandom())};
      if (!dp) begin m1[28:23] = 6'b000001; m2[28:23] = 6'b000001; end
      {a, b} = near_operands(dp, m1, m2, d1, d2);
      x.dp = dp;
      if (dp) begin
        dv = (a > b) ? a - b : b - a;
        x.z1 = lzc(dv, 54); x.z2 = -1;
      end else begin
        du = (a[54:28] > b[54:28]) ? a[54:28] - b[54:28] : b[54:28] - a[54:28];
        dl = (a[27:0] > b[27:0]) ? a[27:0] - b[27:0] : b[27:0] - a[27:0];
        x.z1 = lzc({du, 28'd0}, 54);
        x.z2 = lzc({29'd0, dl[25:0]}, 25);
      end
      q.push_back(x);
    end
    $display("exact %0d, one short %0d, counts > 20: %0d", n_exact, n_short, n_big);
    if (n_exact == 0 || n_short == 0 || n_big == 0) begin failures++; $display("case never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
