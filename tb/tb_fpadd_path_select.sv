// tb_fpadd_path_select: unit test of the final path selection.
// Random FAR and NEAR results, u_n flags, signs and zero flags are applied
// every clock; one clock later the packed result must match the selection
// rule: per lane NEAR when u_n is set (sign s ^ neg, or +0 when zero),
// otherwise FAR (sign s). DP packs {sign, e1, mantissa}; SP packs
// {sign1, e1[7:0], mant[51:29], sign2, e2, mant[22:0]}.
module tb_fpadd_path_select;
  logic        clk = 1'b0, dp, s1, s2, u_n1, u_n2, neg1, neg2, zero1, zero2;
  logic [51:0] far_mant, near_mant;
  logic [10:0] far_e1, near_e1;
  logic [7:0]  far_e2, near_e2;
  logic [63:0] result;
  int          checks = 0, failures = 0;

  fpadd_path_select dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] q[$], x;
    logic [31:0] w1, w2;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (q.size() == 1) begin
        x = q.pop_front();
        checks++;
        if (result !== x) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h exp %h", result, x);
        end
      end
      dp = 1'($urandom()); s1 = 1'($urandom()); s2 = 1'($urandom());
      u_n1 = 1'($urandom()); u_n2 = 1'($urandom());
      neg1 = 1'($urandom()); neg2 = 1'($urandom());
      zero1 = ($urandom_range(0, 4) == 0); zero2 = ($urandom_range(0, 4) == 0);
      if (dp) zero2 = zero1;
      far_mant = {$urandom(), 20'($urandom())}; near_mant = {$urandom(), 20'($urandom())};
      far_e1 = 11'($urandom()); near_e1 = 11'($urandom());
      far_e2 = 8'($urandom());  near_e2 = 8'($urandom());
      if (dp) begin
        if (!u_n1)      x = {s1, far_e1, far_mant};
        else if (zero1) x = '0;
        else            x = {s1 ^ neg1, near_e1, near_mant};
      end else begin
        if (!u_n1)      w1 = {s1, far_e1[7:0], far_mant[51:29]};
        else if (zero1) w1 = '0;
        else            w1 = {s1 ^ neg1, near_e1[7:0], near_mant[51:29]};
        if (!u_n2)      w2 = {s2, far_e2, far_mant[22:0]};
        else if (zero2) w2 = '0;
        else            w2 = {s2 ^ neg2, near_e2, near_mant[22:0]};
        x = {w1, w2};
      end
      q.push_back(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
