// tb_kara_mul27: unit test of the 27x27 Karatsuba multiplier.
// Random and corner operands (0, all ones, half boundaries) are applied one
// per clock with en = 1; every product must equal a*b exactly 4 clocks after
// its operands. A stretch with en = 0 checks that the pipeline holds.
module tb_kara_mul27;
  localparam int LAT = 4;
  logic        clk = 1'b0, en;
  logic [26:0] a, b;
  logic [53:0] p;
  int          checks = 0, failures = 0;
  logic [53:0] expq[$];

  kara_mul27 dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [26:0] pick();
    case ($urandom_range(0, 7))
      0: return '0;
      1: return '1;
      2: return 27'h1FFF;          // low half all ones
      3: return 27'h7FFE000;       // high half all ones
      default: return 27'($urandom());
    endcase
  endfunction

  initial begin
    logic [53:0] held;
    en = 1'b1; a = '0; b = '0;
    for (int i = 0; i < 3000 + LAT; i++) begin
      @(negedge clk);
      if (expq.size() == LAT) begin
        checks++;
        if (p !== expq[0]) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h exp %h", p, expq[0]);
        end
        void'(expq.pop_front());
      end
      a = pick(); b = pick();
      expq.push_back(54'(a) * 54'(b));
    end
    // hold: with en low the output must not change
    @(negedge clk);
    en = 1'b0; held = p;
    repeat (5) begin
      a = pick(); b = pick();
      @(negedge clk);
      checks++;
      if (p !== held) begin failures++; $display("output changed while en=0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
