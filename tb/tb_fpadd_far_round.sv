// tb_fpadd_far_round: unit test of FAR-path rounding and normalisation.
// The testbench makes a realistic FAR case per lane: A = {1, m1, 00}, the
// smaller operand aligned by a random distance with its sticky bit, and
// forms the exact lane value X = {A, 0} +/- {B, sticky} as integers. It
// places X and X + 8 into the 60-bit sum/sum+1 layout of the FAR ALU and,
// one clock later, compares with an integer reference: find the leading
// one of X, round to 53 (DP) or 24 (SP) bits with round-to-nearest-even on
// the bits of X below, renormalise after a rounding carry, and adjust the
// exponent by the leading-one position. For subtractions that are negative
// or need more than one left shift only u_n = 1 is checked.
module tb_fpadd_far_round;
  logic        clk = 1'b0, dp, eop1, eop2, u_n1, u_n2;
  logic [10:0] e1, far_e1;
  logic [7:0]  e2, far_e2;
  logic [59:0] sum0, sum1;
  logic [51:0] mant;
  int          checks = 0, failures = 0, n_un = 0, n_rs = 0, n_ls = 0, n_rnd = 0;

  fpadd_far_round dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic un; logic [51:0] mant; logic [10:0] e; } lane_t;
  typedef struct { logic dp; lane_t l1, l2; } exp_t;

  // X is a lane value of w bits with the hidden bit of A at position m;
  // p = precision in bits.
  function automatic lane_t ref_lane(input logic [63:0] xin, input int w, input int m, input int p,
                                     input logic sub, input logic [10:0] e);
    lane_t       r;
    logic [63:0] x, q, rem, half;
    int          lead, sh;
    x = xin & ((64'd1 << w) - 64'd1);
    r = '{un: 1'b0, mant: '0, e: '0};
    if (sub && x[w-1]) begin r.un = 1'b1; return r; end
    lead = -1;
    for (int i = 0; i < w; i++) if (x[i]) lead = i;
    if (sub && lead < m - 1) begin r.un = 1'b1; return r; end
    if (lead > m) n_rs++;
    if (lead < m) n_ls++;
    sh   = lead - (p - 1);
    q    = x >> sh;
    rem  = x & ((64'd1 << sh) - 64'd1);
    half = 64'd1 << (sh - 1);
    if (rem > half || (rem == half && q[0])) begin q = q + 64'd1; n_rnd++; end
    if (q == (64'd1 << p)) begin q = q >> 1; lead = lead + 1; end
    r.mant = 52'(q & ((64'd1 << (p - 1)) - 64'd1));
    r.e    = 11'(int'(e) + lead - m);
    return r;
  endfunction

  // aligned smaller operand of a lane: {value, sticky}
  function automatic logic [63:0] align(input logic [63:0] v, input int d);
    logic s;
    s = (d == 0) ? 1'b0 : |(v & ((64'd1 << d) - 64'd1));
    return {(v >> d), s};
  endfunction

  initial begin
    exp_t        q[$], x;
    logic [52:0] ma, mb;
    logic [23:0] a1, b1, a2, b2;
    logic [63:0] xd, xu, xl, bb;
    int          d;
    dp = 0; eop1 = 0; eop2 = 0; e1 = 0; e2 = 0; sum0 = 0; sum1 = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (q.size() == 1) begin
        x = q.pop_front();
        checks++;
        if (u_n1 !== x.l1.un || (x.dp && u_n2 !== x.l1.un) || (!x.dp && u_n2 !== x.l2.un) ||
            (!x.l1.un && x.dp && (mant !== x.l1.mant || far_e1 !== x.l1.e)) ||
            (!x.l1.un && !x.dp && (mant[51:29] !== x.l1.mant[22:0] || far_e1 !== {3'b000, x.l1.e[7:0]})) ||
            (!x.dp && !x.l2.un && (mant[22:0] !== x.l2.mant[22:0] || far_e2 !== x.l2.e[7:0]))) begin
          failures++;
          if (failures < 10) $display("mismatch dp=%0d: u_n %b%b/%b%b mant %h/%h e %h/%h", x.dp, u_n1, u_n2,
                                      x.l1.un, x.l2.un, mant, x.l1.mant, far_e1, x.l1.e);
        end
      end
      dp   = 1'($urandom());
      eop1 = 1'($urandom());
      eop2 = dp ? eop1 : 1'($urandom());
      e1   = dp ? 11'($urandom_range(100, 1900)) : 11'($urandom_range(60, 190));
      e2   = 8'($urandom_range(60, 190));
      x.dp = dp;
      if (dp) begin
        ma = {1'b1, $urandom(), 20'($urandom())};
        mb = {1'b1, $urandom(), 20'($urandom())};
        d  = ($urandom_range(0, 1) == 1) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, 63));
        if (d == 0 && mb > ma) {ma, mb} = {mb, ma};
        bb = align({9'd0, mb, 2'b00}, d);
        xd = eop1 ? ({ma, 3'b000} - bb) : ({ma, 3'b000} + bb);
        x.l1 = ref_lane(xd, 58, 55, 53, eop1, e1);
        x.l2 = x.l1;
        sum0 = {xd[57:30], 2'($urandom()), xd[29:0]};
        sum1 = {28'((xd + 64'd8) >> 30), 2'($urandom()), 30'(xd + 64'd8)};
      end else begin
        a1 = {1'b1, 23'($urandom())}; b1 = {1'b1, 23'($urandom())};
        a2 = {1'b1, 23'($urandom())}; b2 = {1'b1, 23'($urandom())};
        d = ($urandom_range(0, 1) == 1) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, 31));
        if (d == 0 && b1 > a1) {a1, b1} = {b1, a1};
        bb = align({38'd0, b1, 2'b00}, d);
        xu = eop1 ? ({a1, 3'b000} - bb) : ({a1, 3'b000} + bb);
        d = ($urandom_range(0, 1) == 1) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, 31));
        if (d == 0 && b2 > a2) {a2, b2} = {b2, a2};
        bb = align({35'd0, 3'b000, b2, 2'b00}, d);
        xl = eop2 ? ({a2, 3'b000} - bb) : ({a2, 3'b000} + bb);
        x.l1 = ref_lane(xu, 29, 26, 24, eop1, e1);
        x.l2 = ref_lane(xl, 30, 26, 24, eop2, {3'b000, e2});
        sum0 = {xu[28:0], 1'($urandom()), xl[29:0]};
        sum1 = {29'(xu + 64'd8), 1'($urandom()), 30'(xl + 64'd8)};
      end
      if (x.l1.un || (!dp && x.l2.un)) n_un++;
      q.push_back(x);
    end
    $display("u_n %0d, right shifts %0d, left shifts %0d, round ups %0d", n_un, n_rs, n_ls, n_rnd);
    if (n_un == 0 || n_rs == 0 || n_ls == 0 || n_rnd == 0) begin failures++; $display("case never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
