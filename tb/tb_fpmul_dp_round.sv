// tb_fpmul_dp_round: unit test of DP rounding and normalisation
// (combinational). From the exact 106-bit product P of two random 53-bit
// significands the testbench builds the compound adder's outputs: a random
// lower carry c, sum0/1/2 = P[105:52] - c + 0/1/2, lower_bits = P[51:0].
// The reference rounds P to 53 bits with round-to-nearest-even by integer
// arithmetic. Directed cases give ties and a rounding carry into [2, 4).
module tb_fpmul_dp_round;
  logic [53:0] sum0, sum1, sum2;
  logic        lower_cout;
  logic [51:0] lower_bits;
  logic        sign;
  logic [10:0] exp;
  logic [63:0] result;
  int          checks = 0, failures = 0, n_tie = 0, n_carry = 0, n_hi = 0;

  fpmul_dp_round dut (.*);

  initial begin : watchdog
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_round(input logic [105:0] x, input logic s, input logic [10:0] e);
    int           n;
    logic [105:0] q, rem, half;
    logic [10:0]  ee;
    n    = x[105] ? 53 : 52;
    ee   = e + 11'(x[105]);
    q    = x >> n;
    rem  = x & ((106'd1 << n) - 106'd1);
    half = 106'd1 << (n - 1);
    if (rem == half) n_tie++;
    if (rem > half || (rem == half && q[0])) q = q + 106'd1;
    if (q == (106'd1 << 53)) begin q = q >> 1; ee = ee + 11'd1; n_carry++; end
    return {s, ee, q[51:0]};
  endfunction

  task automatic run(input logic [52:0] ma, input logic [52:0] mb);
    logic [105:0] pr;
    logic [53:0]  h;
    logic [63:0]  r;
    pr = 106'(ma) * 106'(mb);
    lower_cout = 1'($urandom());
    h = pr[105:52] - 54'(lower_cout);
    sum0 = h; sum1 = h + 54'd1; sum2 = h + 54'd2;
    lower_bits = pr[51:0];
    sign = 1'($urandom());
    exp  = 11'($urandom_range(2, 2000));
    #1;
    if (pr[105]) n_hi++;
    r = ref_round(pr, sign, exp);
    checks++;
    if (result !== r) begin
      failures++;
      if (failures < 10) $display("mismatch P=%h got %h exp %h", pr, result, r);
    end
  endtask

  initial begin
    run(53'h1FFFFFFFFFFFFF, 53'h1FFFFFFFFFFFFF);
    run(53'h18000000000000, 53'h10000000000001);   // tie
    run(53'h18000000000000, 53'h10000000000003);   // tie, upper range
    run(53'h1FFFFFFFFFFFFE, 53'h10000000000001);   // carry into [2, 4)
    for (int i = 0; i < 5000; i++) begin
      logic [52:0] ma, mb;
      ma = {1'b1, $urandom(), 20'($urandom())};
      mb = {1'b1, $urandom(), 20'($urandom())};
      if ($urandom_range(0, 3) == 0) mb[25:0] = '0;
      run(ma, mb);
    end
    $display("ties %0d, rounding carries %0d, products in [2,4) %0d", n_tie, n_carry, n_hi);
    if (n_tie == 0 || n_carry == 0 || n_hi == 0) begin failures++; $display("case never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
