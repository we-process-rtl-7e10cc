// uart_rx: serial byte receiver (8 data bits, no parity, one stop bit).
//
// The line idles high; a frame is a start bit of 0, eight data bits sent
// least significant first, and a stop bit of 1. The input is first passed
// through a two-flop synchroniser. While armed, a low level starts a frame;
// the start bit is confirmed half a bit later (a glitch returns to idle),
// then each data bit is sampled one bit period apart, at its centre, and
// shifted into a right-shift register. If the stop bit reads 1 the byte is
// copied to `data`, `done` rises and stays high, and the receiver disarms. A
// stop bit of 0 (framing error) drops the byte and keeps the receiver armed.
//
// `er` (one-cycle pulse or level) arms the receiver for one frame and clears
// `done`. This handshake is this design's reading of the ER/Done signals of
// the receiver's block diagram; the frame format and the 9600 baud default
// follow the source, the 100 MHz clock is that of the target board.
//
// Timing: `done` rises CLKS_PER_BIT/2 + 9*CLKS_PER_BIT + 3 cycles after the
// falling edge of the start bit reaches `rx` (the middle of the stop bit).
module uart_rx #(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 9600,
  parameter int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  input  logic       er,
  output logic [7:0] data,
  output logic       done
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} rx_state_e;

  rx_state_e     state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          armed;
  logic          rx_m, rx_s;

  // two-flop synchroniser, line idles high
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_m <= 1'b1;
      rx_s <= 1'b1;
    end else begin
      rx_m <= rx;
      rx_s <= rx_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      done    <= 1'b0;
      armed   <= 1'b0;
    end else begin
      if (er) begin
        armed <= 1'b1;
        done  <= 1'b0;
      end
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if ((armed || er) && !rx_s) state <= START;
        end
        START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx_s ? IDLE : DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt     <= '0;
            shreg   <= {rx_s, shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= IDLE;
            if (rx_s) begin
              data  <= shreg;
              done  <= 1'b1;
              armed <= 1'b0;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
