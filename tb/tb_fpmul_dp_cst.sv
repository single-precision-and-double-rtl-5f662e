// tb_fpmul_dp_cst: unit test of the DP carry-save tree and its feedback.
// For random DP significands the testbench forms the two partial products
// of each iteration as the multiplier would (multiplicand halves times the
// low multiplier half in iteration 0, times the high half in iteration 1),
// loads them on consecutive clocks, and checks one clock after each load
// that vec_s + 2*vec_c equals the running sum: after iteration 0 the first
// partial sum placed at bit 27, after iteration 1 the full 106-bit product.
// It also checks that without load the vectors hold.
module tb_fpmul_dp_cst;
  logic         clk = 1'b0, load, itr;
  logic [53:0]  product_h, product_l;
  logic [107:0] vec_s, vec_c;
  int           checks = 0, failures = 0;

  fpmul_dp_cst dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [107:0] expv, input string what);
    logic [107:0] got;
    got = vec_s + {vec_c[106:0], 1'b0};
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, expv);
    end
  endtask

  initial begin
    logic [52:0]  sa, sb;
    logic [26:0]  ch, cl, bh, bl;
    logic [107:0] held_s, held_c;
    load = 1'b0; itr = 1'b0; product_h = '0; product_l = '0;
    for (int i = 0; i < 2000; i++) begin
      sa = {1'b1, $urandom(), 20'($urandom())};
      sb = {1'b1, $urandom(), 20'($urandom())};
      if (i < 2) begin sa = '1; sb = '1; end
      {ch, cl} = {1'b0, sa};
      bh = {1'b0, sb[52:27]};
      bl = sb[26:0];
      @(negedge clk);
      load = 1'b1; itr = 1'b0;
      product_h = 54'(ch) * 54'(bl);
      product_l = 54'(cl) * 54'(bl);
      @(negedge clk);
      check(108'(sa) * 108'(bl) << 27, "iteration 0");
      itr = 1'b1;
      product_h = 54'(ch) * 54'(bh);
      product_l = 54'(cl) * 54'(bh);
      @(negedge clk);
      check(108'(sa) * 108'(sb), "iteration 1");
      load = 1'b0;
      held_s = vec_s; held_c = vec_c;
      @(negedge clk);
      checks++;
      if (vec_s !== held_s || vec_c !== held_c) begin failures++; $display("vectors changed without load"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
