// tb_fpadd_near_alu: unit test of the NEAR-path subtractor.
// Random mantissas (often sharing upper bits) and exponent-difference flags
// are applied every clock; two clocks later each lane's magnitude and sign
// must equal |A - B| and (A < B) computed with integer arithmetic on the
// operands given by fp_pkg::near_operands (DP: 55-bit; SP: lanes [54:28]
// and [27:0]).
module tb_fpadd_near_alu;
  import fp_pkg::*;
  logic        clk = 1'b0, dp, d1, d2;
  logic [51:0] m1, m2;
  logic [54:0] mag;
  logic        neg1, neg2;
  int          checks = 0, failures = 0, n_neg = 0, n_pos = 0;

  fpadd_near_alu dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [54:0] mag; logic n1, n2; } exp_t;

  initial begin
    exp_t        q[$], x;
    logic [54:0] a, b;
    dp = 0; d1 = 0; d2 = 0; m1 = 0; m2 = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (q.size() == 2) begin
        x = q.pop_front();
        checks++;
        if (mag !== x.mag || neg1 !== x.n1 || neg2 !== x.n2) begin
          failures++;
          if (failures < 10) $display("mismatch: mag %h/%h neg %b%b/%b%b", mag, x.mag, neg1, neg2, x.n1, x.n2);
        end
      end
      dp = 1'($urandom());
      d1 = ($urandom_range(0, 2) == 0);
      d2 = dp ? d1 : ($urandom_range(0, 2) == 0);
      m1 = {$urandom(), 20'($urandom())};
      m2 = {$urandom(), 20'($urandom())};
      if ($urandom_range(0, 1) == 0) m2[51:40] = m1[51:40];
      if ($urandom_range(0, 1) == 0) m2[22:10] = m1[22:10];
      if ($urandom_range(0, 9) == 0) m2 = m1;
      if (!dp) begin m1[28:23] = 6'b000001; m2[28:23] = 6'b000001; end
      {a, b} = near_operands(dp, m1, m2, d1, d2);
      if (dp) begin
        x.n1 = (a < b); x.n2 = x.n1;
        x.mag = x.n1 ? b - a : a - b;
      end else begin
        x.n1 = (a[54:28] < b[54:28]);
        x.n2 = (a[27:0] < b[27:0]);
        x.mag[54:28] = x.n1 ? b[54:28] - a[54:28] : a[54:28] - b[54:28];
        x.mag[27:0]  = x.n2 ? b[27:0] - a[27:0] : a[27:0] - b[27:0];
      end
      if (x.n1 || x.n2) n_neg++; else n_pos++;
      q.push_back(x);
    end
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
