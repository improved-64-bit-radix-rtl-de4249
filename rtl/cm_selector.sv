// cm_selector: picks C_M, the carry that the regular computation of partial
// product 15 has already moved from its 7 low bits into bit 7.
//
// Part B recomputes those 7 low bits on its own and would produce that carry a
// second time; C_M is what it must subtract. The selector recodes the top
// multiplier window {y[N-1]..y[N-5]} and chooses the carry into bit 7 of the
// 3X, 5X or 7X adder for digits of magnitude 3, 5 or 7, the carry into bit 6
// of the 3X adder for magnitude 6 (that carry reaches bit 7 once 3X is
// shifted to 6X), and zero for 0, 1, 2, 4 and 8. For a negative digit the
// chosen carry is complemented, as the document derives for a complemented
// odd multiple. The decoding from the raw window (not from the shared
// recoder's one-hot lines) follows the selector's inputs in the document's
// block diagram. Purely combinational.
module cm_selector
  import booth16_pkg::*;
(
  input  logic [4:0] win,     // {y[N-1], y[N-2], y[N-3], y[N-4], y[N-5]}
  input  logic       c7_3x,   // carry into bit 7 of the 3X adder
  input  logic       c6_3x,   // carry into bit 6 of the 3X adder
  input  logic       c7_5x,   // carry into bit 7 of the 5X adder
  input  logic       c7_7x,   // carry into bit 7 of the 7X adder
  output logic       cm       // C_M
);

  r16_digit_t d;

  always_comb begin
    d = r16_recode(win);
    // sel[2]=3, sel[4]=5, sel[5]=6, sel[6]=7
    cm = (d.sel[2] & (c7_3x ^ d.neg)) |
         (d.sel[4] & (c7_5x ^ d.neg)) |
         (d.sel[5] & (c6_3x ^ d.neg)) |
         (d.sel[6] & (c7_7x ^ d.neg));
  end

endmodule
