// seg7_display: hexadecimal seven-segment decoder.
//
// The control unit uses one digit to show the phase of the machine: 0 idle,
// 1 running, E at the end of execution. seg is {g,f,e,d,c,b,a}, active high
// (a common-cathode display; invert for common anode). The decoder is purely
// combinational. The display's role (showing the end of execution) is the
// design's; the digit coding is this implementation's choice.
module seg7_display (
  input  logic [3:0] digit,
  output logic [6:0] seg
);

  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b011_1111;
      4'h1: seg = 7'b000_0110;
      4'h2: seg = 7'b101_1011;
      4'h3: seg = 7'b100_1111;
      4'h4: seg = 7'b110_0110;
      4'h5: seg = 7'b110_1101;
      4'h6: seg = 7'b111_1101;
      4'h7: seg = 7'b000_0111;
      4'h8: seg = 7'b111_1111;
      4'h9: seg = 7'b110_1111;
      4'hA: seg = 7'b111_0111;
      4'hB: seg = 7'b111_1100;
      4'hC: seg = 7'b011_1001;
      4'hD: seg = 7'b101_1110;
      4'hE: seg = 7'b111_1001;
      4'hF: seg = 7'b111_0001;
    endcase
  end

endmodule
