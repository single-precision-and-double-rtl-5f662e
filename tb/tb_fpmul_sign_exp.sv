// tb_fpmul_sign_exp: unit test of the multiplier's sign and exponent
// processing (combinational, checked 1 time unit after the inputs change).
// Expected: s_h = sign(a) ^ sign(b), exponent sums minus the bias computed
// with plain integer arithmetic, in DP mode (one 11-bit exponent) and in SP
// mode (two 8-bit exponents, exp_h zero-extended in 11 bits).
module tb_fpmul_sign_exp;
  logic        dp;
  logic [63:0] a, b;
  logic        s_h, s_l;
  logic [10:0] exp_h;
  logic [7:0]  exp_l;
  int          checks = 0, failures = 0, n_dp = 0, n_sp = 0;

  fpmul_sign_exp dut (.*);

  initial begin : watchdog
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] eh;
    logic [7:0]  el;
    logic        sh, sl;
    for (int i = 0; i < 4000; i++) begin
      dp = 1'($urandom());
      a  = {$urandom(), $urandom()};
      b  = {$urandom(), $urandom()};
      #1;
      sh = a[63] ^ b[63];
      if (dp) begin
        eh = 11'(int'(a[62:52]) + int'(b[62:52]) - 1023);
        sl = sh;
        n_dp++;
      end else begin
        eh = 11'(int'(a[62:55]) + int'(b[62:55]) - 127);
        sl = a[31] ^ b[31];
        n_sp++;
      end
      el = 8'(int'(a[30:23]) + int'(b[30:23]) - 127);
      checks++;
      if (s_h !== sh || s_l !== sl || exp_h !== eh || (!dp && exp_l !== el)) begin
        failures++;
        if (failures < 10) $display("mismatch dp=%0d a=%h b=%h: %h %h exp %h %h", dp, a, b, exp_h, exp_l, eh, el);
      end
    end
    if (n_dp == 0 || n_sp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
