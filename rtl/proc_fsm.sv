// proc_fsm: controller of the processor datapath.
//
// Follows the processor's state diagram (one state per clock):
//   S1   wait until E = 1                                     -> S2
//   S2   SM = 00, load R (R takes RA)                         -> S3
//   S3   (no action)                                          -> S4a
//   S4a  SM = 01, EALU = 1 (ALU captures R, RB and OP = IR);
//        if IR is 0100 or 0101                                -> S4b
//        otherwise                                            -> S5
//   S4b  EU = 1 (capture the product)                         -> S5
//   S5   SM = 10 (multiplexer shows the ALU OUT register)     -> S6
//   S6   Eout = 1 (ALU OUT register takes the ALU result)     -> S7
//   S7   Done = 1, display register loads; stay while E = 1, -> S1 once E = 0
// The diagram's SM assignments are read as holding until the next one, so
// SM is decoded from the state (10 in S1). Two points are this design's
// choice: the unlabelled exits of the last E test (stay while E is high),
// and loading the display register in S7 rather than with Eout in S6, where
// the multiplexer would still show the previous result. Assertions check
// that EU only follows EALU with a multiply opcode and that Eout comes with
// SM = 10. Reset (rst_n low,
// asynchronous) enters S1.
module proc_fsm
  import we_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e,
  input  logic [3:0] ir,
  output logic [1:0] sm,
  output logic       r_en,
  output logic       ealu,
  output logic       eu,
  output logic       eout,
  output logic       disp_en,
  output logic       done
);

  proc_state_e state, state_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= P_S1;
    else        state <= state_next;
  end

  always_comb begin
    state_next = state;
    sm      = 2'b10;
    r_en    = 1'b0;
    ealu    = 1'b0;
    eu      = 1'b0;
    eout    = 1'b0;
    disp_en = 1'b0;
    done    = 1'b0;
    unique case (state)
      P_S1: if (e) state_next = P_S2;
      P_S2: begin
        sm         = 2'b00;
        r_en       = 1'b1;
        state_next = P_S3;
      end
      P_S3: begin
        sm         = 2'b00;
        state_next = P_S4A;
      end
      P_S4A: begin
        sm         = 2'b01;
        ealu       = 1'b1;
        state_next = is_mul(ir) ? P_S4B : P_S5;
      end
      P_S4B: begin
        sm         = 2'b01;
        eu         = 1'b1;
        state_next = P_S5;
      end
      P_S5: state_next = P_S6;
      P_S6: begin
        eout       = 1'b1;
        state_next = P_S7;
      end
      P_S7: begin
        done       = 1'b1;
        disp_en    = 1'b1;
        if (!e) state_next = P_S1;
      end
      default: state_next = P_S1;
    endcase
  end

  // The product is captured only in the cycle right after EALU with a
  // multiply opcode, and the result register only loads with SM on 10.
  a_eu_after_ealu: assert property (@(posedge clk) eu |-> $past(ealu) && is_mul($past(ir)));
  a_eout_sm:       assert property (@(posedge clk) eout |-> sm == 2'b10);

endmodule
