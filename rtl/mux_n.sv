// mux_n: N-input, W-bit multiplexer.
//
// y = d[sel]; a select value of N or above gives 0. In the processor it is the
// three-input multiplexer that feeds register R, the ALU's second operand
// and the display register: input 0 is RA, 1 is RB and 2 the ALU output
// register, chosen by the controller's SM. Purely combinational.
module mux_n #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 3
) (
  input  logic [N-1:0][W-1:0]  d,
  input  logic [$clog2(N)-1:0] sel,
  output logic [W-1:0]         y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (sel == i[$clog2(N)-1:0]) y = d[i];
  end

endmodule
