// tb_fpadd_align_shifter: unit test of the FAR-path alignment shifter.
// Random mantissas and shift amounts are applied every clock; two clocks
// later b55 and the sticky bits must match a plain shift model:
//   DP: {1, m2, 00} >> sha1 (0..63), stk2 = OR of the bits shifted out;
//   SP: the 26-bit upper lane x[54:29] >> sha1 with stk1, and the 29-bit
//       lower lane x[28:0] >> sha2 with stk2, independently.
module tb_fpadd_align_shifter;
  logic        clk = 1'b0, dp;
  logic [51:0] m2;
  logic [5:0]  sha1;
  logic [4:0]  sha2;
  logic [54:0] b55;
  logic        stk1, stk2;
  int          checks = 0, failures = 0, n_pre = 0, n_stk = 0;

  fpadd_align_shifter dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [54:0] b; logic s1, s2; } exp_t;

  function automatic exp_t model(input logic d, input logic [51:0] m, input int a1, input int a2);
    exp_t        r;
    logic [54:0] x;
    logic [25:0] u;
    logic [28:0] l;
    x = {1'b1, m, 2'b00};
    if (d) begin
      r.b  = x >> a1;
      r.s1 = 1'b0;
      r.s2 = (a1 == 0) ? 1'b0 : |(x & ((55'd1 << a1) - 55'd1));
    end else begin
      u = x[54:29]; l = x[28:0];
      r.b  = {u >> a1, l >> a2};
      r.s1 = (a1 == 0) ? 1'b0 : |(u & 26'((64'd1 << a1) - 64'd1));
      r.s2 = (a2 == 0) ? 1'b0 : |(l & 29'((64'd1 << a2) - 64'd1));
    end
    return r;
  endfunction

  initial begin
    exp_t q[$], x;
    dp = 0; m2 = 0; sha1 = 0; sha2 = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (q.size() == 2) begin
        x = q.pop_front();
        checks++;
        if (b55 !== x.b || stk1 !== x.s1 || stk2 !== x.s2) begin
          failures++;
          if (failures < 10) $display("mismatch: b55 %h/%h stk %b%b/%b%b", b55, x.b, stk1, stk2, x.s1, x.s2);
        end
      end
      dp = 1'($urandom());
      m2 = {$urandom(), 20'($urandom())};
      if ($urandom_range(0, 3) == 0) m2[30:0] = '0;
      sha1 = dp ? 6'($urandom()) : 6'($urandom_range(0, 31));
      sha2 = dp ? sha1[4:0] : 5'($urandom());
      if (dp && sha1[5]) n_pre++;
      x = model(dp, m2, int'(sha1), int'(sha2));
      if (x.s1 || x.s2) n_stk++;
      q.push_back(x);
    end
    if (n_pre == 0 || n_stk == 0) begin failures++; $display("pre-shift or sticky never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
