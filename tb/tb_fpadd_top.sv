// tb_fpadd_top: end-to-end test of the merged adder.
// Drives random DP and dual-SP additions/subtractions, one per clock with
// random gaps, and compares every result with IEEE double arithmetic. Each
// result must appear exactly 6 clocks after its operation was applied.
// Stimulus mixes wide exponent ranges (FAR path, large alignment shifts) with
// close operands that cancel many leading bits (NEAR path) and exact x - x.
// Mechanisms counted (each must occur at least once): DP ops, SP ops, NEAR
// results, FAR results, negative NEAR differences, zero results, FAR
// additions that carry out (1-bit right shift), FAR subtractions that need a
// 1-bit left shift, saturated alignment shifts.
module tb_fpadd_top;
  import fp_ref_pkg::*;

  localparam int N_OPS   = 6000;
  localparam int LATENCY = 6;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, in_dp, out_valid, out_dp;
  logic [1:0]  in_op;
  logic [63:0] in_a, in_b, out_result;
  int          checks = 0, failures = 0, cycle = 0;
  int          n_sp = 0, n_dp = 0, n_near = 0, n_far = 0, n_neg = 0, n_zero = 0;
  int          n_carry = 0, n_lshift = 0, n_sat = 0;

  typedef struct { logic [63:0] exp; logic dp; int due; } pend_t;
  pend_t pend[$];

  fpadd_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Internal events, observed at the stage where they are decided.
  always @(posedge clk) if (rst_n) begin
    if (dut.vpipe[4]) begin
      if (dut.u_n1 || (!dut.c5.dp && dut.u_n2)) n_near++;
      if (!dut.u_n1 || (!dut.c5.dp && !dut.u_n2)) n_far++;
      if ((dut.u_n1 && dut.neg1_5 && !dut.zero1) || (!dut.c5.dp && dut.u_n2 && dut.neg2_5 && !dut.zero2)) n_neg++;
    end
    if (dut.vpipe[3]) begin
      if (!dut.c4.eop1 && (dut.c4.dp ? dut.sum0[57] : dut.sum0[58])) n_carry++;
      if (dut.c4.eop1 && dut.c4.dp && !dut.sum0[56] && dut.sum0[55]) n_lshift++;
    end
    if (dut.vpipe[0] && (dut.c1.dp ? dut.sha1 == 6'd63 : dut.sha1 == 6'd31)) n_sat++;
  end

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
        if (failures < 20)
          $display("mismatch cycle %0d dp=%0d got %h exp %h", cycle, pend[idx].dp, out_result, pend[idx].exp);
      end
      pend.delete(idx);
    end
  end

  task automatic drive_one(input logic dp, input logic [1:0] op, input logic [63:0] a, input logic [63:0] b);
    pend_t p;
    @(negedge clk);
    in_valid = 1'b1; in_dp = dp; in_op = op; in_a = a; in_b = b;
    p.dp  = dp;
    p.due = cycle + LATENCY;
    p.exp = dp ? dp_add(a, b, op[1])
               : {sp_add(a[63:32], b[63:32], op[1]), sp_add(a[31:0], b[31:0], op[0])};
    if (dp ? p.exp[62:0] == 0 : (p.exp[62:32] == 0 || p.exp[30:0] == 0)) n_zero++;
    pend.push_back(p);
    if (dp) n_dp++; else n_sp++;
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  function automatic logic [31:0] pick_sp(input logic [31:0] x, input int kind);
    case (kind)
      0: return rand_sp(60);
      1: return near_sp(x, 1);
      default: return x;
    endcase
  endfunction

  initial begin
    logic [63:0] a, b;
    logic [1:0]  op;
    int          kind;
    in_valid = 0; in_dp = 0; in_op = 0; in_a = 0; in_b = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // directed: 1.5 + 1.5 (carry), 1 - 0.75 (left shift), 1.0 - 1.0 (zero),
    // 1 - (1+2^-52) (negative NEAR), tiny + huge (saturated shift)
    drive_one(1'b1, 2'b00, 64'h3FF8_0000_0000_0000, 64'h3FF8_0000_0000_0000);
    drive_one(1'b1, 2'b10, 64'h3FF0_0000_0000_0000, 64'h3FE8_0000_0000_0000);
    drive_one(1'b1, 2'b10, 64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000);
    drive_one(1'b1, 2'b10, 64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0001);
    drive_one(1'b1, 2'b00, 64'h4340_0000_0000_0001, 64'h0100_0000_0000_0001);
    drive_one(1'b0, 2'b11, {32'h3F80_0000, 32'h3FC0_0000}, {32'h3F80_0001, 32'h3FC0_0000});
    drive_one(1'b0, 2'b00, {32'h4B80_0001, 32'h3FC0_0000}, {32'h3F80_0001, 32'h3FC0_0000});
    for (int i = 0; i < N_OPS; i++) begin
      logic dp;
      dp   = ($urandom_range(0, 1) == 1);
      op   = 2'($urandom());
      kind = int'($urandom_range(0, 9));
      if (dp) begin
        a = rand_dp(300);
        if (kind < 4)       b = rand_dp(300);
        else if (kind < 6)  b = near_dp(a, 4);
        else if (kind < 9)  b = near_dp(a, 1);
        else                b = a;
      end else begin
        a = {rand_sp(60), rand_sp(60)};
        b[63:32] = pick_sp(a[63:32], kind < 4 ? 0 : (kind < 9 ? 1 : 2));
        kind = int'($urandom_range(0, 9));
        b[31:0]  = pick_sp(a[31:0], kind < 4 ? 0 : (kind < 9 ? 1 : 2));
      end
      drive_one(dp, op, a, b);
      if ($urandom_range(0, 7) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    if (pend.size() != 0) begin failures++; $display("%0d results missing", pend.size()); end
    $display("SP %0d DP %0d near %0d far %0d neg %0d zero %0d carry %0d lshift %0d satshift %0d",
             n_sp, n_dp, n_near, n_far, n_neg, n_zero, n_carry, n_lshift, n_sat);
    if (n_sp == 0 || n_dp == 0 || n_near == 0 || n_far == 0 || n_neg == 0 || n_zero == 0 ||
        n_carry == 0 || n_lshift == 0 || n_sat == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
