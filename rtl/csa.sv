// csa: W-bit carry-save adder.
//
// A row of W independent full adders: cell i adds x[i], y[i] and z[i] and
// gives the sum bit s[i] and the carry c[i], whose weight is 2^(i+1) (C_{i+1}
// in the usual drawing). No carry travels along the row, so the delay is one
// full adder whatever W is, and x + y + z = s + 2*c. The caller shifts c left
// by one before using it. Combinational.
module csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.x(x[i]), .y(y[i]), .z(z[i]), .s(s[i]), .c(c[i]));
  end

endmodule
