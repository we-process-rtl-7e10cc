// load_reg: W-bit register with load enable.
//
// Loads `d` on a rising clock edge when `en` is high and holds otherwise.
// Used for the byte registers RA and RB, the operand register R, the ALU
// output register and the display register. Reset (rst_n low, asynchronous)
// clears it to 0, so the displays show zeros after power-up as the source
// describes.
module load_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
