// tb_fpadd_setup: unit test of the adder's first stage.
// Random DP and dual-SP operand pairs and operations are applied every
// clock; one clock later the larger exponent, the saturated exponent
// difference, the swapped mantissas, the result sign and the effective
// operation are compared with an integer model written from the IEEE
// definitions (exponent compare, |difference|, sign of the larger operand,
// eop = sign1 ^ sign2 ^ op). Exponent differences of 0, 1 and beyond the
// saturation limit are all forced to occur. In DP mode e2 is not used
// downstream and is not checked.
module tb_fpadd_setup;
  logic        clk = 1'b0, dp;
  logic [1:0]  op;
  logic [63:0] operandone, operandtwo;
  logic        dp_q, s1, s2, eop1, eop2;
  logic [10:0] e1;
  logic [7:0]  e2;
  logic [5:0]  sha1;
  logic [4:0]  sha2;
  logic [51:0] m1, m2;
  int          checks = 0, failures = 0, n_sat = 0, n_swap = 0;

  fpadd_setup dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic dp; logic [10:0] e1; logic [7:0] e2; logic [5:0] sha1; logic [4:0] sha2;
                   logic [51:0] m1, m2; logic s1, s2, eop1, eop2; } exp_t;

  // one lane: exponents, fractions (with hidden bit implied), signs, op
  function automatic void lane(input int ea, input int eb, input logic sa, input logic sb, input logic o, input int sat,
                      output int e, output int sha, output logic swap, output logic s, output logic eop);
    swap = (eb > ea);
    e    = swap ? eb : ea;
    sha  = swap ? eb - ea : ea - eb;
    if (sha > sat) sha = sat;
    s    = swap ? (sb ^ o) : sa;
    eop  = sa ^ sb ^ o;
  endfunction

  function automatic exp_t model(input logic d, input logic [1:0] o, input logic [63:0] x, input logic [63:0] y);
    exp_t r;
    int e, sha;
    logic sw1, sw2, s, eop;
    r.dp = d;
    if (d) begin
      lane(int'(x[62:52]), int'(y[62:52]), x[63], y[63], o[1], 63, e, sha, sw1, s, eop);
      r.e1 = 11'(e); r.e2 = 8'(0); r.sha1 = 6'(sha); r.sha2 = 5'(sha);
      r.s1 = s; r.s2 = s; r.eop1 = eop; r.eop2 = eop;
      r.m1 = sw1 ? y[51:0] : x[51:0];
      r.m2 = sw1 ? x[51:0] : y[51:0];
    end else begin
      lane(int'(x[62:55]), int'(y[62:55]), x[63], y[63], o[1], 31, e, sha, sw1, s, eop);
      r.e1 = 11'(e); r.sha1 = 6'(sha); r.s1 = s; r.eop1 = eop;
      lane(int'(x[30:23]), int'(y[30:23]), x[31], y[31], o[0], 31, e, sha, sw2, s, eop);
      r.e2 = 8'(e); r.sha2 = 5'(sha); r.s2 = s; r.eop2 = eop;
      r.m1 = {sw1 ? y[54:32] : x[54:32], 6'b000001, sw2 ? y[22:0] : x[22:0]};
      r.m2 = {sw1 ? x[54:32] : y[54:32], 6'b000001, sw2 ? x[22:0] : y[22:0]};
    end
    return r;
  endfunction

  initial begin
    exp_t q[$], x;
    dp = 0; op = 0; operandone = 0; operandtwo = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (q.size() == 1) begin
        x = q.pop_front();
        checks++;
        if (dp_q !== x.dp || e1 !== x.e1 || sha1 !== x.sha1 || m1 !== x.m1 || m2 !== x.m2 ||
            s1 !== x.s1 || eop1 !== x.eop1 || (!x.dp && e2 !== x.e2) || sha2 !== x.sha2 || s2 !== x.s2 || eop2 !== x.eop2) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: e1 %h/%h sha1 %0d/%0d m1 %h/%h s1 %b/%b eop1 %b/%b",
                                      i, e1, x.e1, sha1, x.sha1, m1, x.m1, s1, x.s1, eop1, x.eop1);
        end
      end
      dp = 1'($urandom());
      op = 2'($urandom());
      operandone = {$urandom(), $urandom()};
      operandtwo = {$urandom(), $urandom()};
      case ($urandom_range(0, 3))
        0: begin operandtwo[62:52] = operandone[62:52]; operandtwo[30:23] = operandone[30:23]; end
        1: begin operandtwo[62:52] = operandone[62:52] + 11'd1; operandtwo[30:23] = operandone[30:23] - 8'd1; end
        default: ;
      endcase
      x = model(dp, op, operandone, operandtwo);
      if (x.sha1 == (dp ? 6'd63 : 6'd31)) n_sat++;
      if (x.m1 != (dp ? operandone[51:0] : {operandone[54:32], 6'b000001, operandone[22:0]})) n_swap++;
      q.push_back(x);
    end
    if (n_sat == 0 || n_swap == 0) begin failures++; $display("saturation or swap never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
