// tb_fpmul_sp_round: unit test of the SP rounding and normalisation
// (combinational). p is the exact product of two 24-bit significands; the
// reference rounds it to 24 bits with round-to-nearest-even by integer
// arithmetic (remainder compared with one half) and adjusts the exponent
// for the product range [2, 4) and for a rounding carry. Directed cases
// cover ties and the all-ones carry into a new binade.
module tb_fpmul_sp_round;
  logic [53:0] p;
  logic        sign;
  logic [7:0]  exp;
  logic [31:0] result;
  int          checks = 0, failures = 0, n_tie = 0, n_carry = 0, n_hi = 0;

  fpmul_sp_round dut (.*);

  initial begin : watchdog
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_round(input logic [47:0] x, input logic s, input logic [7:0] e);
    int          n;
    logic [47:0] q, rem, half;
    logic [7:0]  ee;
    n    = x[47] ? 24 : 23;
    ee   = e + 8'(x[47]);
    q    = x >> n;
    rem  = x & ((48'd1 << n) - 48'd1);
    half = 48'd1 << (n - 1);
    if (rem > half || (rem == half && q[0])) q = q + 48'd1;
    if (rem == half) n_tie++;
    if (q == 48'h100_0000) begin q = q >> 1; ee = ee + 8'd1; n_carry++; end
    return {s, ee, q[22:0]};
  endfunction

  task automatic run(input logic [23:0] ma, input logic [23:0] mb);
    logic [31:0] r;
    p = 54'(ma) * 54'(mb);
    sign = 1'($urandom());
    exp  = 8'($urandom_range(2, 250));
    #1;
    if (p[47]) n_hi++;
    r = ref_round(p[47:0], sign, exp);
    checks++;
    if (result !== r) begin
      failures++;
      if (failures < 10) $display("mismatch p=%h got %h exp %h", p, result, r);
    end
  endtask

  initial begin
    run(24'hFFFFFF, 24'hFFFFFF);
    run(24'hFFFFFF, 24'h800001);
    run(24'h800001, 24'h800001);
    run(24'hC00000, 24'hC00000);
    run(24'h800000, 24'h800003);
    run(24'hC00000, 24'h800001);   // tie, odd: rounds up
    run(24'hC00000, 24'h800003);   // tie in the upper range
    run(24'hFFFFFE, 24'h800001);   // rounds up into [2, 4)
    for (int i = 0; i < 5000; i++) begin
      logic [23:0] ma, mb;
      ma = {1'b1, 23'($urandom())};
      mb = {1'b1, 23'($urandom())};
      if ($urandom_range(0, 3) == 0) mb[10:0] = '0;   // more ties
      run(ma, mb);
    end
    $display("ties %0d, rounding carries %0d, products in [2,4) %0d", n_tie, n_carry, n_hi);
    if (n_tie == 0 || n_carry == 0 || n_hi == 0) begin failures++; $display("case never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
