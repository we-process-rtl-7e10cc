// seg_display: shows a byte as two hex digits on two seven-segment displays.
//
// The byte is split into its high and low nibble. The displays share their
// segment lines, so they are lit in turn: the top bit of a free-running
// REFRESH_BITS-bit counter selects the digit, an[0] (low nibble) while it is
// 0 and an[1] (high nibble) while it is 1, each for 2^(REFRESH_BITS-1)
// cycles (about 0.65 ms at 100 MHz with the default 17). Digit enables are
// active low. Splitting into two hex digits follows the source; the time
// multiplexing and the refresh rate are this design's choice.
module seg_display #(
  parameter int unsigned REFRESH_BITS = 17
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] value,
  output logic [6:0] seg,
  output logic [1:0] an
);

  logic [REFRESH_BITS-1:0] refresh;
  logic                    digit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) refresh <= '0;
    else        refresh <= refresh + 1'b1;
  end

  assign digit = refresh[REFRESH_BITS-1];
  assign an    = digit ? 2'b01 : 2'b10;

  hex7seg u_dec (.hex(digit ? value[7:4] : value[3:0]), .seg(seg));

endmodule
