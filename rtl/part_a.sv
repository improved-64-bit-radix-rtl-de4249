// part_a: speculative upper half of the short addition that removes one row
// from the partial-product array.
//
// It adds, over bit positions N+3..N+7 of the product, the sign-extension bits
// of partial product 0 (s0 four times, then c0 = ~s0) and bits 3..7 of
// partial product N/4 (x[7:3] AND y[N-1], since that digit is only a transfer
// of 0 or 1). The sign s0 is y[3], because the least significant digit has no
// incoming transfer. A 5-bit compound adder forms the sum for a carry-in of 0
// and of 1 in parallel; `sel`, the carry out of part B, picks one. The three
// constant ones above (the 111 of partial product 1 at N+8..N+10) are folded in
// without an adder: they become ~cout, and the carry out of the whole short
// addition is cout itself. Outputs z[15:7] replace those 8 array bits plus one
// new bit at N+11. Structure as in the document's part A figure; purely
// combinational.
module part_a (
  input  logic       y3,     // y[3]: sign s0 of partial product 0
  input  logic       ytop,   // y[N-1]: digit of the top partial product
  input  logic [4:0] x7_3,   // x[7:3]
  input  logic       sel,    // carry-in from part B
  output logic [8:0] z       // z[15:7] of the short addition, z[0] is z7
);

  logic [4:0] opa, opb;
  logic [5:0] sum0, sum1, r;

  always_comb begin
    opa  = {~y3, y3, y3, y3, y3};
    opb  = x7_3 & {5{ytop}};
    sum0 = {1'b0, opa} + {1'b0, opb};
    sum1 = {1'b0, opa} + {1'b0, opb} + 6'd1;
    r    = sel ? sum1 : sum0;
    z    = {r[5], {3{~r[5]}}, r[4:0]};
  end

endmodule
