// booth16_recoder: radix-16 Booth recoder for one multiplier digit.
//
// Takes the four bits of a radix-16 digit position plus the top bit of the
// position to its right (the transfer digit t_i) and forms the recoded digit
// z_i = w_i + t_i in {-8..8}: the group value v is kept when v < 8, and turned
// into v-16 with a transfer of 1 to the next position when v >= 8. The digit
// leaves as a one-hot code on 8 lines with an implicit zero (all lines low)
// and a separate negate bit, matching the recoder of the partial-product
// generator slice. The negate bit is also the hot one that completes the two's
// complement of a negative partial product. The encoding of the outputs as a
// packed struct is this design's choice. Purely combinational.
module booth16_recoder
  import booth16_pkg::*;
(
  input  logic [4:0]  win,    // {y[4i+3], y[4i+2], y[4i+1], y[4i], y[4i-1]}
  output r16_digit_t  digit   // negate bit and one-hot magnitude
);

  always_comb digit = r16_recode(win);

endmodule
