// alu: clocked ALU of the processor, with a two-step multiply.
//
// On a clock edge with `ealu` high the ALU captures its two operands (`a`
// from register R, `b` from the multiplexer) and the opcode. The result `y`
// of every non-multiply opcode is combinational in the captured values, so
// it is valid from the cycle after EALU. The multiply opcodes (0100: low
// byte of a*b, 0101: high byte) use the Wallace-tree multiplier; its product
// is taken into a product register on a later edge with `eu` high, and `y`
// shows the selected product byte from the cycle after EU, two cycles after
// EALU when EU directly follows it, one cycle later than the other results.
// That extra capture signal and the two multiply codes follow the source;
// the remaining opcode assignments (see we_pkg) are this design's choice.
// Operands are unsigned; shifts use b[2:0] as the distance; compares give
// 1 or 0. Reset (rst_n low, asynchronous) clears all registers.
module alu
  import we_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ealu,
  input  logic         eu,
  input  logic [3:0]   op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [W-1:0]   a_q, b_q;
  alu_op_e        op_q;
  logic [2*W-1:0] prod, prod_q;
  logic [$clog2(W)-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      op_q <= OP_ADD;
    end else if (ealu) begin
      a_q  <= a;
      b_q  <= b;
      op_q <= alu_op_e'(op);
    end
  end

  wallace_mul #(.W(W)) u_mul (.a(a_q), .b(b_q), .p(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  prod_q <= '0;
    else if (eu) prod_q <= prod;
  end

  assign sh = b_q[$clog2(W)-1:0];

  always_comb begin
    unique case (op_q)
      OP_ADD:   y = a_q + b_q;
      OP_SUB:   y = a_q - b_q;
      OP_SHL:   y = a_q << sh;
      OP_SHR:   y = a_q >> sh;
      OP_MULLO: y = prod_q[W-1:0];
      OP_MULHI: y = prod_q[2*W-1:W];
      OP_AND:   y = a_q & b_q;
      OP_OR:    y = a_q | b_q;
      OP_XOR:   y = a_q ^ b_q;
      OP_NAND:  y = ~(a_q & b_q);
      OP_NOR:   y = ~(a_q | b_q);
      OP_XNOR:  y = ~(a_q ^ b_q);
      OP_NOTA:  y = ~a_q;
      OP_LT:    y = W'(a_q < b_q);
      OP_EQ:    y = W'(a_q == b_q);
      OP_PASSA: y = a_q;
      default:  y = a_q;
    endcase
  end

endmodule
