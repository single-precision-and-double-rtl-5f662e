// tb_fp_merged_top: end-to-end test of the complete design at its default
// configuration. The multiplier and the adder are driven at the same time
// from two independent processes with random DP / dual-SP operations; each
// result is compared with IEEE double arithmetic and must arrive exactly at
// its latency (multiplier SP 6, DP 9; adder 6 clocks after acceptance).
// Mechanisms counted, each must occur at least once: multiplier SP and DP
// operations, multiplier ready stalls (DP second iteration), adder SP and DP
// operations, NEAR-path results, FAR-path results, exact zero results,
// negative NEAR differences.
module tb_fp_merged_top;
  import fp_ref_pkg::*;

  localparam int N_MUL = 2000;
  localparam int N_ADD = 3000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        mul_in_valid, mul_in_ready, mul_in_dp, mul_out_valid, mul_out_dp;
  logic [63:0] mul_in_a, mul_in_b, mul_out_result;
  logic        add_in_valid, add_in_dp, add_out_valid, add_out_dp;
  logic [1:0]  add_in_op;
  logic [63:0] add_in_a, add_in_b, add_out_result;
  int          checks = 0, failures = 0, cycle = 0;
  int          n_msp = 0, n_mdp = 0, n_stall = 0, n_asp = 0, n_adp = 0;
  int          n_near = 0, n_far = 0, n_zero = 0, n_neg = 0;
  bit          mul_done = 0, add_done = 0;

  typedef struct { logic [63:0] exp; logic dp; int due; } pend_t;
  pend_t mpend[$], apend[$];

  fp_merged_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.u_add.vpipe[4]) begin
    if (dut.u_add.u_n1 || (!dut.u_add.c5.dp && dut.u_add.u_n2)) n_near++;
    if (!dut.u_add.u_n1 || (!dut.u_add.c5.dp && !dut.u_add.u_n2)) n_far++;
    if (dut.u_add.u_n1 && dut.u_add.neg1_5 && !dut.u_add.zero1) n_neg++;
  end

  task automatic check_out(ref pend_t q[$], input logic [63:0] res, input logic dp, input string what);
    int idx = -1;
    foreach (q[i]) if (q[i].due == cycle) idx = i;
    checks++;
    if (idx < 0) begin
      failures++; $display("%s: unexpected result at cycle %0d", what, cycle);
    end else begin
      if (res !== q[idx].exp || dp !== q[idx].dp) begin
        failures++;
        if (failures < 20) $display("%s mismatch cycle %0d got %h exp %h", what, cycle, res, q[idx].exp);
      end
      q.delete(idx);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (mul_out_valid) check_out(mpend, mul_out_result, mul_out_dp, "mul");
    if (add_out_valid) check_out(apend, add_out_result, add_out_dp, "add");
  end

  initial begin : mul_driver
    pend_t p;
    logic  dp;
    logic [63:0] a, b;
    mul_in_valid = 0; mul_in_dp = 0; mul_in_a = 0; mul_in_b = 0;
    wait (rst_n);
    repeat (2) @(posedge clk);
    for (int i = 0; i < N_MUL; i++) begin
      dp = ($urandom_range(0, 1) == 1);
      if (dp) begin a = rand_dp(400); b = rand_dp(400); end
      else begin a = {rand_sp(50), rand_sp(50)}; b = {rand_sp(50), rand_sp(50)}; end
      @(negedge clk);
      mul_in_valid = 1'b1; mul_in_dp = dp; mul_in_a = a; mul_in_b = b;
      while (!mul_in_ready) begin n_stall++; @(negedge clk); end
      p.dp  = dp;
      p.due = cycle + (dp ? 9 : 6);
      p.exp = dp ? dp_mul(a, b) : {sp_mul(a[63:32], b[63:32]), sp_mul(a[31:0], b[31:0])};
      mpend.push_back(p);
      if (dp) n_mdp++; else n_msp++;
      @(posedge clk);
      #1 mul_in_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    mul_done = 1;
  end

  initial begin : add_driver
    pend_t p;
    logic  dp;
    logic [1:0]  op;
    logic [63:0] a, b;
    int kind;
    add_in_valid = 0; add_in_dp = 0; add_in_op = 0; add_in_a = 0; add_in_b = 0;
    wait (rst_n);
    repeat (2) @(posedge clk);
    for (int i = 0; i < N_ADD; i++) begin
      dp   = ($urandom_range(0, 1) == 1);
      op   = 2'($urandom());
      kind = int'($urandom_range(0, 9));
      if (dp) begin
        a = rand_dp(300);
        b = (kind < 4) ? rand_dp(300) : (kind < 9) ? near_dp(a, 1) : a;
      end else begin
        a = {rand_sp(60), rand_sp(60)};
        b = (kind < 4) ? {rand_sp(60), rand_sp(60)} :
            (kind < 9) ? {near_sp(a[63:32], 1), near_sp(a[31:0], 1)} : a;
      end
      @(negedge clk);
      add_in_valid = 1'b1; add_in_dp = dp; add_in_op = op; add_in_a = a; add_in_b = b;
      p.dp  = dp;
      p.due = cycle + 6;
      p.exp = dp ? dp_add(a, b, op[1])
                 : {sp_add(a[63:32], b[63:32], op[1]), sp_add(a[31:0], b[31:0], op[0])};
      if (dp ? p.exp[62:0] == 0 : (p.exp[62:32] == 0 || p.exp[30:0] == 0)) n_zero++;
      apend.push_back(p);
      if (dp) n_adp++; else n_asp++;
      @(posedge clk);
      #1 add_in_valid = 1'b0;
      if ($urandom_range(0, 7) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    add_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (mul_done && add_done);
    repeat (20) @(posedge clk);
    if (mpend.size() != 0 || apend.size() != 0) begin
      failures++; $display("%0d/%0d results missing", mpend.size(), apend.size());
    end
    $display("mul SP %0d DP %0d stalls %0d | add SP %0d DP %0d near %0d far %0d zero %0d neg %0d",
             n_msp, n_mdp, n_stall, n_asp, n_adp, n_near, n_far, n_zero, n_neg);
    if (n_msp == 0 || n_mdp == 0 || n_stall == 0 || n_asp == 0 || n_adp == 0 ||
        n_near == 0 || n_far == 0 || n_zero == 0 || n_neg == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
