// pp_select: one regular partial product of the radix-16 Booth multiplier.
//
// An 8:1 multiplexer with implicit zero picks the magnitude multiple named by
// the recoder's one-hot code: 1X, 2X, 4X and 8X are shifts of the
// multiplicand, 3X, 5X and 7X come from the odd-multiple adders and 6X is 3X
// shifted left by one. The selected N+3-bit magnitude is widened to N+4 bits
// and XORed with the negate bit, giving the partial product in one's
// complement; the matching +1 (the hot one) leaves on `hot_one` and is placed
// in the array by the caller. Bit N+3 of `pp` is therefore the sign bit s of
// the partial product. Structure as in the slice of the partial-product
// generation figure; purely combinational.
module pp_select
  import booth16_pkg::*;
#(
  parameter int unsigned N = 64  // operand width
) (
  input  logic [N-1:0]  x,        // multiplicand X
  input  logic [N+2:0]  m3,       // 3X
  input  logic [N+2:0]  m5,       // 5X
  input  logic [N+2:0]  m7,       // 7X
  input  r16_digit_t    digit,    // recoded digit
  output logic [N+3:0]  pp,       // partial product, one's complement when negative
  output logic          hot_one   // +1 for the two's complement
);

  logic [N+2:0] mult [8];
  logic [N+2:0] mag;

  always_comb begin
    mult[0] = (N+3)'(x);
    mult[1] = (N+3)'(x) << 1;
    mult[2] = m3;
    mult[3] = (N+3)'(x) << 2;
    mult[4] = m5;
    mult[5] = m3 << 1;
    mult[6] = m7;
    mult[7] = (N+3)'(x) << 3;
    // one-hot AND-OR multiplexer: no line set gives zero
    mag = '0;
    for (int k = 0; k < 8; k++) mag |= mult[k] & {(N+3){digit.sel[k]}};
    pp      = {1'b0, mag} ^ {(N+4){digit.neg}};
    hot_one = digit.neg;
  end

endmodule
