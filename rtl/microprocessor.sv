// microprocessor: the processor datapath with its controller.
//
// A three-input multiplexer (select SM) picks RA (0), RB (1) or the ALU OUT
// register (2). Its output feeds register R, the ALU's second operand and
// the display register; R feeds the ALU's first operand; the ALU result goes
// to the ALU OUT register, which loops back to multiplexer input 2. After a
// start pulse on `e`, proc_fsm runs: R <- RA, ALU <- (R, RB, ir), optional
// product capture, OUT <- result, display <- OUT. `disp` therefore shows
// f(RA, RB) from the cycle after `done` is high: the display register
// changes on the 7th clock edge after the edge that samples `e` high for
// ordinary opcodes and on the 8th for the multiply opcodes (S1 sees e, then
// S2..S7, one clock each, plus S4b when multiplying). This structure follows the source's datapath drawing; the display
// register loading in S7 instead of with Eout is this design's choice. Both
// OUT registers reset to 0, so the display starts at 00.
module microprocessor #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] ra,
  input  logic [W-1:0] rb,
  input  logic         e,
  input  logic [3:0]   ir,
  output logic [W-1:0] disp,
  output logic         done
);

  logic [1:0]         sm;
  logic               r_en, ealu, eu, eout, disp_en;
  logic [2:0][W-1:0]  mux_in;
  logic [W-1:0]       mux_out, r_q, alu_y, out_q;

  proc_fsm u_fsm (
    .clk, .rst_n, .e, .ir, .sm, .r_en, .ealu, .eu, .eout, .disp_en, .done
  );

  assign mux_in = {out_q, rb, ra};

  mux_n #(.W(W), .N(3)) u_mux (.d(mux_in), .sel(sm), .y(mux_out));

  load_reg #(.W(W)) u_r (.clk, .rst_n, .en(r_en), .d(mux_out), .q(r_q));

  alu #(.W(W)) u_alu (
    .clk, .rst_n, .ealu, .eu, .op(ir), .a(r_q), .b(mux_out), .y(alu_y)
  );

  load_reg #(.W(W)) u_out (.clk, .rst_n, .en(eout), .d(alu_y), .q(out_q));

  load_reg #(.W(W)) u_disp (.clk, .rst_n, .en(disp_en), .d(mux_out), .q(disp));

endmodule
