// uart_counter: the byte counter ("3count") of the UART receiver.
//
// A WIDTH-bit up-counter that advances by one on every clock with `ec` high
// and wraps from 3 back to 0. Its value `zt` tells the UART controller which
// register the next byte goes to (01: RA, 10: RB, 00 and 11: advance again),
// so bytes land alternately in RA and RB. Wrapping at 3 is this design's
// reading of the name "3count". Reset (rst_n low, asynchronous) clears it.
module uart_counter #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ec,
  output logic [WIDTH-1:0] zt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  zt <= '0;
    else if (ec) zt <= zt + 1'b1;
  end

endmodule
