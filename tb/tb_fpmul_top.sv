// tb_fpmul_top: end-to-end test of the merged multiplier.
// Drives a random mix of DP and dual-SP multiplications with random gaps,
// compares every result with IEEE double arithmetic, and checks that each
// result arrives exactly 6 (SP) or 9 (DP) clocks after it was accepted.
// Also counts back-to-back DP issue, ready stalls and results that land in
// the same clock as the pipeline's other mode.
module tb_fpmul_top;
  import fp_ref_pkg::*;

  localparam int N_OPS = 4000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, in_ready, in_dp, out_valid, out_dp;
  logic [63:0] in_a, in_b, out_result;
  int          checks = 0, failures = 0, cycle = 0;
  int          n_sp = 0, n_dp = 0, n_stall = 0, n_round_ovf = 0;

  typedef struct { logic [63:0] exp; logic dp; int due; } pend_t;
  pend_t pend[$];

  fpmul_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;  // value seen in a cycle = index of the next rising edge

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(posedge clk) if (rst_n && out_valid) begin
    int idx = -1;
    foreach (pend[i]) if (pend[i].due == cycle) idx = i;
    checks++;
    if (idx < 0) begin
      failures++;
      $display("unexpected result at cycle %0d: %h", cycle, out_result);
    end else begin
      if (out_result !== pend[idx].exp || out_dp !== pend[idx].dp) begin
        failures++;
        $display("mismatch cycle %0d dp=%0d got %h exp %h", cycle, pend[idx].dp, out_result, pend[idx].exp);
      end
      pend.delete(idx);
    end
  end

  // Inputs change on the falling edge; acceptance is judged from in_ready
  // just before the rising edge, and "cycle" then names that rising edge.
  task automatic drive_one(input logic dp, input logic [63:0] a, input logic [63:0] b);
    pend_t p;
    @(negedge clk);
    in_valid = 1'b1; in_dp = dp; in_a = a; in_b = b;
    while (!in_ready) begin n_stall++; @(negedge clk); end
    p.dp  = dp;
    p.due = cycle + (dp ? 9 : 6);
    p.exp = dp ? dp_mul(a, b) : {sp_mul(a[63:32], b[63:32]), sp_mul(a[31:0], b[31:0])};
    pend.push_back(p);
    if (dp) n_dp++; else n_sp++;
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  initial begin
    logic [63:0] a, b;
    in_valid = 0; in_dp = 0; in_a = 0; in_b = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // directed: values whose rounding carries into a new binade
    drive_one(1'b1, 64'h3FFF_FFFF_FFFF_FFFF, 64'h3FF0_0000_0000_0001);
    drive_one(1'b0, {32'h3FFF_FFFF, 32'h3F80_0001}, {32'h3F80_0001, 32'h3FFF_FFFF});
    drive_one(1'b1, 64'h3FF8_0000_0000_0000, 64'h4000_0000_0000_0000);
    drive_one(1'b0, {32'h3FC0_0000, 32'hC040_0000}, {32'h4000_0000, 32'h3FC0_0000});
    for (int i = 0; i < N_OPS; i++) begin
      logic dp;
      dp = ($urandom_range(0, 1) == 1);
      if (dp) begin a = rand_dp(400); b = rand_dp(400); end
      else begin
        a = {rand_sp(50), rand_sp(50)};
        b = {rand_sp(50), rand_sp(50)};
      end
      if ($urandom_range(0, 9) == 0) begin
        // all-ones fractions make rounding overflow likely
        if (dp) begin a[51:0] = '1; b[51:0] = 52'd1; end
        else begin a[54:32] = '1; b[54:32] = 23'd1; end
        n_round_ovf++;
      end
      drive_one(dp, a, b);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    if (pend.size() != 0) begin failures++; $display("%0d results missing", pend.size()); end
    $display("SP ops %0d, DP ops %0d, ready stalls %0d, round-carry vectors %0d", n_sp, n_dp, n_stall, n_round_ovf);
    if (n_sp == 0 || n_dp == 0 || n_stall == 0 || n_round_ovf == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
