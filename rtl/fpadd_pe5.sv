// fpadd_pe5: 5-bit priority encoder of the leading-zero counter
// (combinational). ind[4] is the most significant indicator bit.
//   valid = OR of the five bits; code = position of the first one counted
//   from ind[4] (0..4), or 5 when no bit is set.
// Truth table as in the source design.
module fpadd_pe5 (
  input  logic [4:0] ind,
  output logic       valid,
  output logic [2:0] code
);
  always_comb begin
    valid = |ind;
    casez (ind)
      5'b1????: code = 3'd0;
      5'b01???: code = 3'd1;
      5'b001??: code = 3'd2;
      5'b0001?: code = 3'd3;
      5'b00001: code = 3'd4;
      default:  code = 3'd5;
    endcase
  end
endmodule
