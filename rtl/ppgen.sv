// ppgen: partial-product generation stage of the N x N unsigned radix-16
// Booth multiplier, with the array height reduced from N/4+1 to N/4 rows.
//
// The multiplier Y is recoded into N/4+1 radix-16 digits. Digits 0..N/4-1 lie
// in {-8..8} and each selects a regular (N+4)-bit partial product from the
// multiples 1X..8X (3X, 5X, 7X from shared odd-multiple adders). The top digit
// is only the transfer out of the last group, 0 or 1, so its partial product
// is X AND y[N-1]. Sign extension uses the usual constants: CSSS above
// partial product 0, 111C above the others; the two's-complement ones b_i sit
// in the row below, at the partial product's least significant bit.
//
// In that array the 17th row is what makes the columns from N-4 up to N+2 one
// bit too high. A short 16-bit addition, run beside the regular generation,
// removes it: part B adds bits 0..6 of partial product N/4-1, its b bit and
// bits 0..2 of the top partial product; part A adds the sign-extension bits
// of partial product 0, the 111 above partial product 1 and bits 3..7 of the
// top partial product. Its result z[15:0] (bit positions N-4..N+11) replaces
// those bits. What is left of the top partial product (bits 8..N-1, at
// positions N+8..2N-1) fits in the empty upper part of row 0, so the array
// leaves as exactly N/4 rows of 2N bits; their sum modulo 2^(2N) is X*Y.
//
// Row layout (positions in the product):
//   row 0      : pp0[N+2:0] at 0, z[11:7] at N+3, top pp bits 8..N-1 at N+8
//   row 1      : b0 at 0, pp1[N+2:0] at 4, ~s1 at N+7, z[15:12] at N+8
//   row i      : b(i-1) at 4i-4, pp_i[N+2:0] at 4i, ~s_i at 4i+N+3, 111 above
//   row N/4-1  : b(N/4-2) at N-8, z[6:0] at N-4, pp[N+2:7] at N+3, ~s at 2N-1
// The recoding, multiple generation, parts A and B, the C_M selector and the
// final row layout follow the document. Bits 0..6 of the regular partial
// product N/4-1 are computed by its slice but not used (part B supplies them),
// so synthesis removes them, as the document notes. Placing the leftover top partial
// product into row 0 is this design's reading of the merge step. Purely
// combinational; N must be a multiple of 4 and at least 16.
module ppgen
  import booth16_pkg::*;
#(
  parameter int unsigned N = 64  // operand width
) (
  input  logic [N-1:0]   x,                // multiplicand X
  input  logic [N-1:0]   y,                // multiplier Y
  output logic [2*N-1:0] rows [N/4]        // reduced partial-product array
);

  localparam int unsigned R = N / 4;   // rows, and regular partial products

  // ---- odd multiples ----
  logic [N+2:0] m3, m5, m7;
  logic         c6_3x, c7_3x, c6_5x, c7_5x, c6_7x, c7_7x;

  odd_multiple_adder #(.N(N), .MULT(3)) u_add3 (.x(x), .m(m3), .c6(c6_3x), .c7(c7_3x));
  odd_multiple_adder #(.N(N), .MULT(5)) u_add5 (.x(x), .m(m5), .c6(c6_5x), .c7(c7_5x));
  odd_multiple_adder #(.N(N), .MULT(7)) u_add7 (.x(x), .m(m7), .c6(c6_7x), .c7(c7_7x));

  // ---- regular partial products 0..R-1 ----
  logic [N:0]   yext;              // y with y[-1] = 0 below it
  r16_digit_t   digit [R];
  logic [N+3:0] pp    [R];
  logic         b     [R];

  assign yext = {y, 1'b0};

  for (genvar i = 0; i < R; i++) begin : g_pp
    booth16_recoder u_rec (.win(yext[4*i+4 -: 5]), .digit(digit[i]));
    pp_select #(.N(N)) u_sel (
      .x(x), .m3(m3), .m5(m5), .m7(m7), .digit(digit[i]),
      .pp(pp[i]), .hot_one(b[i])
    );
  end

  // ---- top partial product: transfer digit y[N-1] times X ----
  logic [N-1:8] pptop;   // bits 0..7 are formed inside parts A and B
  assign pptop = x[N-1:8] & {(N-8){y[N-1]}};

  // ---- short addition: selector, part B, part A ----
  logic [4:0]  wtop;
  logic        cm, sel;
  logic [6:0]  zlo;
  logic [8:0]  zhi;
  logic [15:0] z;

  assign wtop = y[N-1:N-5];

  cm_selector u_cm (
    .win(wtop), .c7_3x(c7_3x), .c6_3x(c6_3x), .c7_5x(c7_5x), .c7_7x(c7_7x), .cm(cm)
  );
  part_b u_pb (.win(wtop), .x7(x[6:0]), .cm(cm), .z(zlo), .sel(sel));
  part_a u_pa (.y3(y[3]), .ytop(y[N-1]), .x7_3(x[7:3]), .sel(sel), .z(zhi));

  assign z = {zhi, zlo};

  // ---- merge into R rows ----
  always_comb begin
    for (int i = 0; i < R; i++) begin
      rows[i] = '0;
      if (i == 0) begin
        rows[i][N+2:0]    = pp[0][N+2:0];
        rows[i][N+7:N+3]  = z[11:7];
        rows[i][2*N-1:N+8] = pptop[N-1:8];
      end else begin
        rows[i][4*i-4]    = b[i-1];
        if (i == R - 1) begin
          rows[i][N-4 +: 7]  = z[6:0];
          rows[i][N+3 +: N-4] = pp[i][N+2:7];
          rows[i][2*N-1]     = ~pp[i][N+3];
        end else begin
          rows[i][4*i +: N+3] = pp[i][N+2:0];
          rows[i][4*i+N+3]   = ~pp[i][N+3];
          if (i == 1) rows[i][N+11:N+8] = z[15:12];
          else for (int k = 4*i+N+4; k <= 4*i+N+6; k++)
            if (k < 2*N) rows[i][k] = 1'b1;
        end
      end
    end
  end

  // c6 of the 5X and 7X adders is not needed
  logic unused;
  assign unused = c6_5x ^ c6_7x;

endmodule
