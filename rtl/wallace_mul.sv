// wallace_mul: unsigned W x W multiplier built from a Wallace tree of
// carry-save adders.
//
// Partial products: row i is `a` gated by bit i of `b` (a multiplexer that
// picks a or 0) and shifted left by i, as in the partial-product drawing of
// the source. The rows are reduced three at a time by carry-save adders
// (each turns three rows into a sum row and a carry row shifted left by one)
// until two rows are left; one ordinary adder then forms the product. For
// the default W = 8 the eight rows go 8 -> 6 -> 4 -> 3 -> 2 in four
// carry-save levels; the tree is generated for any W >= 3. All rows are 2W
// bits wide, which holds the product exactly. The tree shape and the final
// adder are this design's choices. Combinational.
module wallace_mul #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int unsigned PW = 2 * W;
  // Rows present at each level: level 0 has W rows; each level turns every
  // full group of three into two and passes the rest through.
  function automatic int unsigned rows_at(input int unsigned lvl);
    int unsigned r = W;
    for (int unsigned k = 0; k < lvl; k++) r = (r / 3) * 2 + (r % 3);
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r = W;
    int unsigned n = 0;
    while (r > 2) begin
      r = (r / 3) * 2 + (r % 3);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  logic [PW-1:0] pp [W];

  // partial products
  for (genvar i = 0; i < W; i++) begin : g_pp
    assign pp[i] = b[i] ? (PW'(a) << i) : '0;
  end

  // One generate block per tree level; each holds the rows it produces.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned RIN  = rows_at(l);
    localparam int unsigned NCSA = RIN / 3;
    localparam int unsigned REST = RIN % 3;
    logic [PW-1:0] rin  [RIN];
    logic [PW-1:0] rout [rows_at(l + 1)];
    if (l == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_lvl[l-1].rout;
    end
    for (genvar g = 0; g < NCSA; g++) begin : g_csa
      logic [PW-1:0] s, c;
      csa #(.W(PW)) u_csa (
        .x(rin[3*g]), .y(rin[3*g+1]), .z(rin[3*g+2]), .s(s), .c(c)
      );
      assign rout[2*g]   = s;
      assign rout[2*g+1] = c << 1;
    end
    for (genvar k = 0; k < REST; k++) begin : g_pass
      assign rout[2*NCSA+k] = rin[3*NCSA+k];
    end
  end

  assign p = g_lvl[LEVELS-1].rout[0] + g_lvl[LEVELS-1].rout[1];

endmodule
