// hex7seg: hex digit to seven-segment pattern.
//
// seg = {g, f, e, d, c, b, a}, active low (0 lights a segment), the order and
// polarity of the target board's common-anode displays; this mapping is this
// design's choice. Digits 0-9 and A, b, C, d, E, F. Combinational.
module hex7seg (
  input  logic [3:0] hex,
  output logic [6:0] seg
);

  logic [6:0] on;  // active high, {g,f,e,d,c,b,a}

  always_comb begin
    unique case (hex)
      4'h0: on = 7'b0111111;
      4'h1: on = 7'b0000110;
      4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111;
      4'h4: on = 7'b1100110;
      4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101;
      4'h7: on = 7'b0000111;
      4'h8: on = 7'b1111111;
      4'h9: on = 7'b1101111;
      4'hA: on = 7'b1110111;
      4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001;
      4'hD: on = 7'b1011110;
      4'hE: on = 7'b1111001;
      4'hF: on = 7'b1110001;
      default: on = 7'b0000000;
    endcase
  end

  assign seg = ~on;

endmodule
