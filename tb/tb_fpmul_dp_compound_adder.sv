// tb_fpmul_dp_compound_adder: unit test of the DP compound adder.
// Random carry-save pairs with the zero fields that the CST guarantees
// (vec_s[107:106], vec_c[107:105] and vec_c[26:0] zero) are applied; one
// clock later {sum0 + lower_cout, lower_bits} must equal vec_s + 2*vec_c
// (106 bits), and sum1, sum2 must be sum0 + 1 and sum0 + 2. Also checks the
// hold behaviour with en = 0 and counts lower carries.
module tb_fpmul_dp_compound_adder;
  logic         clk = 1'b0, en;
  logic [107:0] vec_s, vec_c;
  logic [53:0]  sum0, sum1, sum2;
  logic         lower_cout;
  logic [51:0]  lower_bits;
  int           checks = 0, failures = 0, n_cout = 0;

  fpmul_dp_compound_adder dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [107:0] rnd108();
    return {12'($urandom()), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    logic [107:0] total;
    logic [53:0]  h0;
    en = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      vec_s = rnd108(); vec_s[107:106] = '0;
      vec_c = rnd108(); vec_c[107:105] = '0; vec_c[26:0] = '0;
      if (i % 7 == 0) begin vec_s[51:28] = '1; vec_c[50:27] = 24'h1; end
      total = vec_s + {vec_c[106:0], 1'b0};
      @(negedge clk);
      h0 = sum0 + 54'(lower_cout);
      if (lower_cout) n_cout++;
      checks++;
      if ({h0, lower_bits} !== total[105:0] || sum1 !== sum0 + 54'd1 || sum2 !== sum0 + 54'd2) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h %h exp %h", h0, lower_bits, total[105:0]);
      end
    end
    en = 1'b0;
    h0 = sum0;
    vec_s = rnd108();
    @(negedge clk);
    checks++;
    if (sum0 !== h0) begin failures++; $display("output changed while en=0"); end
    if (n_cout == 0) begin failures++; $display("no lower carry seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
