// uart_receiver: receives bytes over the serial line and stores them
// alternately in RA and RB.
//
// Six parts: the serial receiver (uart_rx), a 1-to-2 demultiplexer, the
// byte registers RA and RB, the controller (uart_fsm) and the byte counter
// (uart_counter). The controller arms the receiver, waits for its done flag,
// steps the counter to 01 (first byte -> RA) or 10 (second byte -> RB), loads
// that register through the demultiplexer and pulses `done_rx` for one
// cycle. Bytes 1, 3, 5, ... land in RA and 2, 4, 6, ... in RB. The block
// structure and the controller follow the source; the receiver's insides are
// this design's own. `done_rx` is high for one cycle, starting two clock
// edges after the receiver's done rises, or four when the counter has to
// step past 11 and 00 first (bytes 3, 5, 7, ...) -- see uart_fsm.
module uart_receiver #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] ra,
  output logic [7:0] rb,
  output logic       done_rx
);

  logic             er, ec, e1, e2, s, rx_done;
  logic [1:0]       zt;
  logic [7:0]       rx_data;
  logic [1:0][7:0]  dm;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rx(rxd), .er, .data(rx_data), .done(rx_done)
  );

  demux #(.W(8), .N(2)) u_demux (.d(rx_data), .sel(s), .q(dm));

  load_reg #(.W(8)) u_ra (.clk, .rst_n, .en(e1), .d(dm[0]), .q(ra));
  load_reg #(.W(8)) u_rb (.clk, .rst_n, .en(e2), .d(dm[1]), .q(rb));

  uart_counter #(.WIDTH(2)) u_cnt (.clk, .rst_n, .ec, .zt);

  uart_fsm u_fsm (
    .clk, .rst_n, .rx_done, .zt, .er, .ec, .e1, .e2, .s, .done(done_rx)
  );

endmodule
