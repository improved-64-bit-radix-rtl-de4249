// booth16_pkg: types and helper functions shared by the radix-16 Booth
// multiplier.
//
// A radix-16 Booth digit lies in {-8..8}. It travels as a negate flag plus an
// 8-line one-hot magnitude select (line k-1 set for magnitude k, all lines low
// for a zero digit), which is the form the 8:1 partial-product multiplexer
// consumes directly. The recoding rule follows the minimally redundant
// radix-16 digit set: digit = -8*y[4i+3] + 4*y[4i+2] + 2*y[4i+1] + y[4i] +
// y[4i-1]. A zero digit is never flagged negative (the string 11111 gives a
// positive zero), so a zero partial product needs no two's-complement one.
package booth16_pkg;

  typedef struct packed {
    logic       neg;  // digit is negative: complement the multiple, add 1
    logic [7:0] sel;  // one-hot magnitude: sel[k-1] selects k*X, none = 0
  } r16_digit_t;

  // Signed value of a 5-bit Booth window {y[4i+3], y[4i+2], y[4i+1], y[4i], y[4i-1]}.
  function automatic int r16_value(input logic [4:0] w);
    return -8 * int'(w[4]) + 4 * int'(w[3]) + 2 * int'(w[2]) + int'(w[1]) + int'(w[0]);
  endfunction

  // Radix-16 recoding of a 5-bit window into negate flag and one-hot magnitude.
  function automatic r16_digit_t r16_recode(input logic [4:0] w);
    r16_digit_t d;
    int         v;
    int         mag;
    v     = r16_value(w);
    mag   = (v < 0) ? -v : v;
    d.neg = (v < 0);
    d.sel = '0;
    for (int k = 1; k <= 8; k++) d.sel[k-1] = (mag == k);
    return d;
  endfunction

endpackage
