// tb_fpmul_operand_proc: unit test of the multiplier's operand processing
// (combinational). Instead of comparing bit patterns, it checks what the
// halves are for: in SP mode mcand_h*mlier_h and mcand_l*mlier_l must be the
// two significand products; in DP mode the multiplicand halves must form
// the 53-bit significand of a, and the multiplier halves of iteration 1 and
// 0 must form b's significand as (high * 2^27 + low), both halves equal.
module tb_fpmul_operand_proc;
  logic        dp, itr;
  logic [63:0] a, b;
  logic [26:0] mcand_h, mcand_l, mlier_h, mlier_l;
  int          checks = 0, failures = 0;

  fpmul_operand_proc dut (.*);

  initial begin : watchdog
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("fail: %s a=%h b=%h", what, a, b); end
  endtask

  initial begin
    logic [26:0] hi1, lo0;
    logic [53:0] siga, sigb;
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      // SP
      dp = 1'b0; itr = 1'($urandom()); #1;
      expect_true(54'(mcand_h) * 54'(mlier_h) == 54'({1'b1, a[54:32]}) * 54'({1'b1, b[54:32]}), "sp upper");
      expect_true(54'(mcand_l) * 54'(mlier_l) == 54'({1'b1, a[22:0]}) * 54'({1'b1, b[22:0]}), "sp lower");
      // DP
      dp = 1'b1; itr = 1'b1; #1;
      siga = {1'b0, 1'b1, a[51:0]};
      sigb = {1'b0, 1'b1, b[51:0]};
      expect_true({mcand_h, mcand_l} == siga, "dp multiplicand");
      expect_true(mlier_h == mlier_l, "dp itr1 halves equal");
      hi1 = mlier_h;
      itr = 1'b0; #1;
      expect_true(mlier_h == mlier_l, "dp itr0 halves equal");
      lo0 = mlier_l;
      expect_true((54'(hi1) << 27) + 54'(lo0) == sigb, "dp multiplier");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
