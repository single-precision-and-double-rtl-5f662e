// tb_fpadd_far_alu: unit test of the merged FAR-path compound adder.
// Random operands are applied every clock; one clock later each lane view
// of sum (DP {sum[59:32], sum[29:0]}, SP1 sum[59:31], SP2 sum[29:0]) must
// equal the lane's {A, 0} +/- {B, sticky} computed with ordinary integer
// arithmetic modulo the lane width, and sum+1 must be that plus one unit in
// the L position (bit 3 of the lane view). Additions and subtractions are
// mixed per lane in SP mode, so the lane separation is exercised.
module tb_fpadd_far_alu;
  logic        clk = 1'b0, dp, eop1, eop2, stk1, stk2;
  logic [51:0] m1;
  logic [54:0] b55;
  logic [59:0] sum0, sum1;
  int          checks = 0, failures = 0, n_mixed = 0;

  fpadd_far_alu dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic dp; logic [57:0] d; logic [28:0] u; logic [29:0] l; } exp_t;

  initial begin
    exp_t        q[$], x;
    logic [54:0] a;
    logic [57:0] dv0, dv1;
    logic [28:0] uv0, uv1;
    logic [29:0] lv0, lv1;
    dp = 0; eop1 = 0; eop2 = 0; stk1 = 0; stk2 = 0; m1 = 0; b55 = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (q.size() == 1) begin
        x = q.pop_front();
        dv0 = {sum0[59:32], sum0[29:0]}; dv1 = {sum1[59:32], sum1[29:0]};
        uv0 = sum0[59:31];               uv1 = sum1[59:31];
        lv0 = sum0[29:0];                lv1 = sum1[29:0];
        checks++;
        if (x.dp ? (dv0 !== x.d || dv1 !== x.d + 58'd8)
                 : (uv0 !== x.u || uv1 !== x.u + 29'd8 || lv0 !== x.l || lv1 !== x.l + 30'd8)) begin
          failures++;
          if (failures < 10) $display("mismatch dp=%0d sum0=%h", x.dp, sum0);
        end
      end
      dp   = 1'($urandom());
      eop1 = 1'($urandom());
      eop2 = dp ? eop1 : 1'($urandom());
      if (!dp && eop1 != eop2) n_mixed++;
      m1   = {$urandom(), 20'($urandom())};
      b55  = {23'($urandom()), $urandom()} >> $urandom_range(0, 20);
      stk1 = dp ? 1'b0 : 1'($urandom());
      stk2 = 1'($urandom());
      if (!dp) begin m1[25:20] = 6'b000001; b55[28:26] = 3'b000; end
      a = {1'b1, m1, 2'b00};
      x.dp = dp;
      x.d  = eop1 ? ({2'b00, a, 1'b0} - {2'b00, b55, stk2}) : ({2'b00, a, 1'b0} + {2'b00, b55, stk2});
      x.u  = eop1 ? ({2'b00, a[54:29], 1'b0} - {2'b00, b55[54:29], stk1})
                  : ({2'b00, a[54:29], 1'b0} + {2'b00, b55[54:29], stk1});
      x.l  = eop2 ? ({a[28:0], 1'b0} - {b55[28:0], stk2}) : ({a[28:0], 1'b0} + {b55[28:0], stk2});
      q.push_back(x);
    end
    if (n_mixed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
