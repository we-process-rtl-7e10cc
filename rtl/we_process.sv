// we_process: serial-port calculator -- a UART receiver feeding a small
// processor whose result is shown on two seven-segment displays.
//
// The host sends bytes at BAUD (8 data bits, no parity, 1 stop bit). The
// receiver stores them alternately in RA and RB and pulses DoneRx after each
// one; that pulse starts the processor, which computes RA op RB with the
// opcode on `ir` and loads the result into its display register. The
// display block shows that byte as two hex digits. Because the processor
// runs after every byte, the display shows f(new RA, old RB) after the first
// byte of a pair and f(RA, RB) after the second. The display reads 00 after
// reset. `result` brings the displayed byte out directly and `done` is the
// processor's Done (high while it is in its final state).
//
// The split into receiver, processor and display, and their connections,
// follow the source. The opcode coming from a port (on the board, slide
// switches), the 100 MHz clock of the target board, and the result port are
// this design's choices. Reset is asynchronous, active low.
module we_process #(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 9600,
  parameter int unsigned REFRESH_BITS = 17
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       uart_rxd,
  input  logic [3:0] ir,
  output logic [6:0] seg,
  output logic [1:0] an,
  output logic [7:0] result,
  output logic       done
);

  logic [7:0] ra, rb;
  logic       done_rx;

  uart_receiver #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .rxd(uart_rxd), .ra, .rb, .done_rx
  );

  microprocessor #(.W(8)) u_proc (
    .clk, .rst_n, .ra, .rb, .e(done_rx), .ir, .disp(result), .done(done)
  );

  seg_display #(.REFRESH_BITS(REFRESH_BITS)) u_disp (
    .clk, .rst_n, .value(result), .seg, .an
  );

endmodule
