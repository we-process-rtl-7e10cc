// uart_fsm: controller of the UART receiver.
//
// Follows the receiver's state diagram:
//   S1  ER = 1 (arm the receiver)                       -> S2
//   S2  wait for the receiver's done; when it is 1, Ec = 1 -> S3
//   S3  look at the counter value Zt:
//         00 or 11: Ec = 1, stay in S3 (counter moves on)
//         01:       E1 = 1, S = 0 (byte to RA)          -> S4
//         10:       E2 = 1, S = 1 (byte to RB)          -> S4
//   S4  Done = 1                                        -> S1
// Outputs written in a decision branch are Mealy outputs of the state above
// it, as in an ASM chart; S is 0 wherever nothing sets it. Because S3 sees
// the counter after the increment made in S2, successive bytes go to RA,
// RB, RA, RB, ... Assertions check that a byte is never loaded into both
// registers and that E1/E2 match the counter value and S. The unnamed Done
// box is called S4 here. Reset (rst_n low,
// asynchronous) enters S1.
module uart_fsm
  import we_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_done,
  input  logic [1:0] zt,
  output logic       er,
  output logic       ec,
  output logic       e1,
  output logic       e2,
  output logic       s,
  output logic       done
);

  uart_state_e state, state_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= U_S1;
    else        state <= state_next;
  end

  always_comb begin
    state_next = state;
    er   = 1'b0;
    ec   = 1'b0;
    e1   = 1'b0;
    e2   = 1'b0;
    s    = 1'b0;
    done = 1'b0;
    unique case (state)
      U_S1: begin
        er         = 1'b1;
        state_next = U_S2;
      end
      U_S2: begin
        if (rx_done) begin
          ec         = 1'b1;
          state_next = U_S3;
        end
      end
      U_S3: begin
        unique case (zt)
          2'b01: begin
            e1         = 1'b1;
            s          = 1'b0;
            state_next = U_S4;
          end
          2'b10: begin
            e2         = 1'b1;
            s          = 1'b1;
            state_next = U_S4;
          end
          default: ec = 1'b1;
        endcase
      end
      U_S4: begin
        done       = 1'b1;
        state_next = U_S1;
      end
      default: state_next = U_S1;
    endcase
  end

  // A byte goes to exactly one register, and only while the counter says so.
  a_one_target: assert property (@(posedge clk) !(e1 && e2));
  a_e1_at_01:   assert property (@(posedge clk) e1 |-> zt == 2'b01 && !s);
  a_e2_at_10:   assert property (@(posedge clk) e2 |-> zt == 2'b10 && s);

endmodule
