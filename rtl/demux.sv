// demux: routes one W-bit input to one of N outputs.
//
// Output q[sel] carries d, every other output is 0. In the UART receiver it
// steers the received byte to RA (sel = 0) or RB (sel = 1) under the
// controller's S signal; driving unselected outputs to 0 is this design's
// choice. Purely combinational.
module demux #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 2
) (
  input  logic [W-1:0]                 d,
  input  logic [$clog2(N)-1:0]         sel,
  output logic [N-1:0][W-1:0]          q
);

  always_comb begin
    q = '0;
    for (int i = 0; i < N; i++)
      if (sel == i[$clog2(N)-1:0]) q[i] = d;
  end

endmodule
