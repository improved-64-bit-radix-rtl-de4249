// part_b: lower half of the short addition that removes one row from the
// partial-product array.
//
// It adds, over bit positions N-4..N+2 of the product, the 7 low bits of
// partial product N/4-1 (the last regular one), that partial product's
// two's-complement one, and bits 0..2 of partial product N/4 (x[2:0] AND
// y[N-1]). Partial product N/4-1 is not waited for: its 7 low bits are
// rebuilt from x[6:0] as the sum of two radix-4 partial products, one with
// digit lo in {-2..2} from y[N-3..N-5] and one with weight 4 and digit hi in
// {-2..2} from y[N-1..N-3], so that 4*hi + lo equals the radix-16 digit.
// A negative radix-4 multiple is the bit inverse of the shifted multiple with
// the shifted-in zeros left at zero, plus a hot one of weight |multiple|; the
// four hot ones form the field abcd (weights 8, 4, 2, 1). A 3:2 carry-save
// adder and a 7-bit carry-propagate adder sum the three 7-bit operands.
//
// The two carries out (Cout1 from the carry-save adder, Cout2 from the
// carry-propagate adder) overcount by C_M, the carry the regular partial
// product already carries into bit 7, so sel = Cout1 ^ Cout2 ^ C_M.
//
// The radix-4 recoders are modified so that every radix-16 digit is split the
// same way the odd-multiple adders compute it. Strings 00100 and 11011 give
// (hi,lo) = (0,2) and (0,-2), as the document prescribes; 3 and -3 stay
// (1,-1) and (-1,1), matching 3X = 4X - X. This design also maps 01011 to
// (2,-2) and 10100 to (-2,2), so that 6 and -6 always pair with 6X = 2*(4X-X)
// and the carry into bit 6 of the 3X adder. Without that, those two strings
// give a wrong sel for some multiplicands. Purely combinational.
module part_b (
  input  logic [4:0] win,   // {y[N-1], y[N-2], y[N-3], y[N-4], y[N-5]}
  input  logic [6:0] x7,    // x[6:0]
  input  logic       cm,    // C_M from the selector
  output logic [6:0] z,     // z[6:0] of the short addition
  output logic       sel    // carry into bit N+3, selects part A's result
);

  typedef struct packed {
    logic neg;
    logic one;   // magnitude 1
    logic two;   // magnitude 2
  } r4_digit_t;

  function automatic r4_digit_t r4_from_int(input int v);
    r4_digit_t d;
    d.neg = (v < 0);
    d.one = (v == 1) || (v == -1);
    d.two = (v == 2) || (v == -2);
    return d;
  endfunction

  int        hi_v, lo_v;
  r4_digit_t hi, lo;
  logic [6:0] u, h, o;      // the three operands
  logic [6:0] s, c;         // carry-save sum and carry
  logic [7:0] cpa;
  logic       cout1, cout2;
  logic       a, b, cc, d;  // hot ones, weights 8, 4, 2, 1

  always_comb begin
    hi_v = -2 * int'(win[4]) + int'(win[3]) + int'(win[2]);
    lo_v = -2 * int'(win[2]) + int'(win[1]) + int'(win[0]);
    unique case (win)
      5'b00100: begin hi_v =  0; lo_v =  2; end
      5'b11011: begin hi_v =  0; lo_v = -2; end
      5'b01011: begin hi_v =  2; lo_v = -2; end
      5'b10100: begin hi_v = -2; lo_v =  2; end
      default: ;
    endcase
    hi = r4_from_int(hi_v);
    lo = r4_from_int(lo_v);

    // low 4:1 multiplexer: +-1X, +-2X of x[6:0]
    u = ({7{lo.one}} & (x7 ^ {7{lo.neg}})) |
        ({7{lo.two}} & {x7[5:0] ^ {6{lo.neg}}, 1'b0});
    // high 4:1 multiplexer: +-4X, +-8X of x[6:0]
    h = ({7{hi.one}} & {x7[4:0] ^ {5{hi.neg}}, 2'b00}) |
        ({7{hi.two}} & {x7[3:0] ^ {4{hi.neg}}, 3'b000});
    a  = hi.neg & hi.two;
    b  = hi.neg & hi.one;
    cc = lo.neg & lo.two;
    d  = lo.neg & lo.one;
    o  = {x7[2:0] & {3{win[4]}}, a, b, cc, d};

    // 3:2 carry-save adder
    s     = u ^ h ^ o;
    c     = (u & h) | (u & o) | (h & o);
    cout1 = c[6];
    // 7-bit carry-propagate adder
    cpa   = {1'b0, s} + {1'b0, c[5:0], 1'b0};
    cout2 = cpa[7];
    z     = cpa[6:0];
    sel   = cout1 ^ cout2 ^ cm;
  end

endmodule
