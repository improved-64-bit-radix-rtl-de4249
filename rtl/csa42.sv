// csa42: word-wide 4:2 carry-save adder (compressor).
//
// Reduces four W-bit operands to a sum word and a carry word with the same
// total modulo 2^W, built as two rows of full adders: the first 3:2 row adds
// a, b, c; the second adds its sum, its shifted carry and d. Carries out of
// bit W-1 are dropped, since the multiplier only needs the product modulo
// 2^W. The two-row construction is this design's choice of 4:2 cell.
// Purely combinational.
module csa42 #(
  parameter int unsigned W = 128  // word width
) (
  input  logic [W-1:0] a, b, c, d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry      // already aligned: weight as sum
);

  logic [W-1:0] s1, c1, c1s;

  always_comb begin
    s1    = a ^ b ^ c;
    c1    = (a & b) | (a & c) | (b & c);
    c1s   = c1 << 1;
    sum   = s1 ^ c1s ^ d;
    carry = ((s1 & c1s) | (s1 & d) | (c1s & d)) << 1;
  end

endmodule
