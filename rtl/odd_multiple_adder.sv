// odd_multiple_adder: carry-propagate adder that forms an odd multiple of the
// multiplicand (3X, 5X or 7X) for the radix-16 partial products.
//
// The multiples are formed as 3X = 4X - X, 5X = 4X + X and 7X = 8X - X, the
// subtractions as 4X + ~X + 1 and 8X + ~X + 1 over N+3 bits. Writing 3X as
// 4X - X follows the document, which does so to keep the regular partial
// product consistent with the two radix-4 recodings of the height-reduction
// logic; 7X as 8X - X and 5X as 4X + X are this design's reading of the same
// rule (the radix-4 pairs for 7 and 5 are (8,-1) and (4,1)). The adder is
// split at bits 6 and 7 so that the carries into those bit positions, which
// the C_M selector needs, are real internal signals: c6 is used for 6X = 2*3X,
// c7 for 3X, 5X and 7X. The split is this design's choice; any adder
// architecture with the same carries will do. Purely combinational.
module odd_multiple_adder #(
  parameter int unsigned N    = 64,  // operand width
  parameter int unsigned MULT = 3    // 3, 5 or 7
) (
  input  logic [N-1:0] x,    // multiplicand X
  output logic [N+2:0] m,    // MULT * X
  output logic         c6,   // carry into bit 6
  output logic         c7    // carry into bit 7
);

  localparam int unsigned W = N + 3;

  logic [W-1:0] a, b;
  logic         cin;
  logic [6:0]   lo6;   // bits 5..0 plus carry into bit 6
  logic [1:0]   b6;    // bit 6 plus carry into bit 7
  logic [W-8:0] hi;    // bits W-1..7 (carry out dropped)

  always_comb begin
    unique case (MULT)
      5:       begin a = W'(x) << 2; b = W'(x);  cin = 1'b0; end
      7:       begin a = W'(x) << 3; b = ~W'(x); cin = 1'b1; end
      default: begin a = W'(x) << 2; b = ~W'(x); cin = 1'b1; end
    endcase
    lo6 = {1'b0, a[5:0]} + {1'b0, b[5:0]} + 7'(cin);
    c6  = lo6[6];
    b6  = 2'(a[6]) + 2'(b[6]) + 2'(c6);
    c7  = b6[1];
    hi  = a[W-1:7] + b[W-1:7] + (W-7)'(c7);
    m   = {hi, b6[0], lo6[5:0]};
  end

  initial assert (MULT == 3 || MULT == 5 || MULT == 7)
    else $error("odd_multiple_adder: MULT must be 3, 5 or 7");

endmodule
