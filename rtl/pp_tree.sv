// pp_tree: partial-product reduction tree (TREE stage).
//
// Reduces ROWS operands of W bits to two with levels of 4:2 carry-save
// adders: each level halves the number of rows, so the 16 rows of the 64-bit
// multiplier take three levels (16 -> 8 -> 4 -> 2), which is the regular
// all-4:2 tree that a maximum column height of 16 allows. ROWS must be a
// power of two, at least 4. The document gives the tree's function and the
// 4:2 levels; the word-wide cell and the wiring order are this design's
// choice. Purely combinational.
module pp_tree #(
  parameter int unsigned W    = 128,  // word width (2N)
  parameter int unsigned ROWS = 16    // operands in (N/4)
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  localparam int unsigned LEVELS = $clog2(ROWS) - 1;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN = ROWS >> l;
    logic [W-1:0] ins  [NIN];
    logic [W-1:0] outs [NIN/2];
    if (l == 0) begin : g_first
      assign ins = rows;
    end else begin : g_next
      assign ins = g_lvl[l-1].outs;
    end
    for (genvar j = 0; j < NIN / 4; j++) begin : g_csa
      csa42 #(.W(W)) u_csa (
        .a(ins[4*j]), .b(ins[4*j+1]), .c(ins[4*j+2]), .d(ins[4*j+3]),
        .sum(outs[2*j]), .carry(outs[2*j+1])
      );
    end
  end

  assign sum   = g_lvl[LEVELS-1].outs[0];
  assign carry = g_lvl[LEVELS-1].outs[1];

  initial assert (ROWS >= 4 && (ROWS & (ROWS - 1)) == 0)
    else $error("pp_tree: ROWS must be a power of two, at least 4");

endmodule
