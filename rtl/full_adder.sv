// full_adder: one-bit full adder, the cell of the carry-save adder.
//
// s = x ^ y ^ z and c = majority(x, y, z), so 2*c + s = x + y + z. The cell
// and its port names (X, Y, Z in; S, C out) follow the carry-save adder
// drawing; the gate equations are the textbook ones. Combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);

  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);

endmodule
