// tb_fpadd_pe5: exhaustive test of the 5-bit priority encoder
// (combinational): for all 32 inputs, valid must be the OR of the bits and
// code the number of zeros above the first one (5 when there is none).
module tb_fpadd_pe5;
  logic [4:0] ind;
  logic       valid;
  logic [2:0] code;
  int         checks = 0, failures = 0;

  fpadd_pe5 dut (.*);

  initial begin : watchdog
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int z;
    for (int v = 0; v < 32; v++) begin
      ind = 5'(v);
      #1;
      z = 5;
      for (int k = 0; k < 5; k++) if (z == 5 && ind[4 - k]) z = k;
      checks++;
      if (valid !== (v != 0) || code !== 3'(z)) begin
        failures++; $display("ind=%b: valid %b code %0d, expected code %0d", ind, valid, code, z);
      end
    end
    // a few random repeats in random order
    for (int i = 0; i < 200; i++) begin
      ind = 5'($urandom());
      #1;
      z = 5;
      for (int k = 0; k < 5; k++) if (z == 5 && ind[4 - k]) z = k;
      checks++;
      if (valid !== (ind != 0) || code !== 3'(z)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
