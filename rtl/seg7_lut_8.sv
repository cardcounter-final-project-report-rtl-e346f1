// seg7_lut_8: shows a 32-bit value as eight hexadecimal digits.
//
// Digit k (seg[k]) displays bits 4k+3..4k of `value`, so seg[0] is the least
// significant digit. Each digit is a 7-bit segment pattern, bit 0 = segment a
// through bit 6 = segment g, active low (a segment is lit when its bit is 0),
// as needed by common-anode displays. Purely combinational.
//
// The original instantiates such a block to show the frame counter; the
// segment ordering, polarity and letter shapes (A b C d E F) are this design's
// choices.
module seg7_lut_8 #(
  parameter int unsigned DIGITS = 8
) (
  input  logic [4*DIGITS-1:0]  value,
  output logic [DIGITS-1:0][6:0] seg
);

  function automatic logic [6:0] hex_to_seg(logic [3:0] d);
    logic [6:0] lit;   // active-high, bit 0 = a
    unique case (d)
      4'h0: lit = 7'b011_1111;
      4'h1: lit = 7'b000_0110;
      4'h2: lit = 7'b101_1011;
      4'h3: lit = 7'b100_1111;
      4'h4: lit = 7'b110_0110;
      4'h5: lit = 7'b110_1101;
      4'h6: lit = 7'b111_1101;
      4'h7: lit = 7'b000_0111;
      4'h8: lit = 7'b111_1111;
      4'h9: lit = 7'b110_1111;
      4'hA: lit = 7'b111_0111;
      4'hB: lit = 7'b111_1100;
      4'hC: lit = 7'b011_1001;
      4'hD: lit = 7'b101_1110;
      4'hE: lit = 7'b111_1001;
      4'hF: lit = 7'b111_0001;
    endcase
    return ~lit;
  endfunction

  always_comb begin
    for (int unsigned k = 0; k < DIGITS; k++)
      seg[k] = hex_to_seg(value[4*k +: 4]);
  end

endmodule
