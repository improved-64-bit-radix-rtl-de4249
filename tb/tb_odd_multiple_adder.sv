// tb_odd_multiple_adder: test of the 3X, 5X and 7X generators at N = 64.
//
// Random and corner multiplicands drive all three. Each product must equal
// k*X, and the carry taps must equal the carries of the defining sums on the
// low bits alone: 3X = 4X + ~X + 1, 5X = 4X + X, 7X = 8X + ~X + 1, with c7
// the carry out of bits 6..0 and c6 the carry out of bits 5..0. Prints
// TB_RESULT.
module tb_odd_multiple_adder;
  localparam int N = 64;

  logic [N-1:0] x;
  logic [N+2:0] m3, m5, m7;
  logic         c6_3, c7_3, c6_5, c7_5, c6_7, c7_7;
  int checks = 0, failures = 0;

  odd_multiple_adder #(.N(N), .MULT(3)) d3 (.x(x), .m(m3), .c6(c6_3), .c7(c7_3));
  odd_multiple_adder #(.N(N), .MULT(5)) d5 (.x(x), .m(m5), .c6(c6_5), .c7(c7_5));
  odd_multiple_adder #(.N(N), .MULT(7)) d7 (.x(x), .m(m7), .c6(c6_7), .c7(c7_7));

  function automatic logic carry_out(input int bits, input int a, input int b, input int cin);
    int msk;
    msk = (1 << bits) - 1;
    return 1'(((a & msk) + (b & msk) + cin) >> bits);
  endfunction

  task automatic check(input string what, input logic [N+2:0] got, input logic [N+2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%h got=%h exp=%h", what, x, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int xl;
      x = (t < 128) ? {$urandom(), $urandom()} & ~64'h7F | 64'(t) :
          (t == 128) ? '1 : {$urandom(), $urandom()};
      #1;
      xl = int'(x[7:0]);
      check("3X", m3, 67'(x) * 3);
      check("5X", m5, 67'(x) * 5);
      check("7X", m7, 67'(x) * 7);
      check("c7(3X)", 67'(c7_3), 67'(carry_out(7, xl << 2, ~xl, 1)));
      check("c6(3X)", 67'(c6_3), 67'(carry_out(6, xl << 2, ~xl, 1)));
      check("c7(5X)", 67'(c7_5), 67'(carry_out(7, xl << 2, xl, 0)));
      check("c6(5X)", 67'(c6_5), 67'(carry_out(6, xl << 2, xl, 0)));
      check("c7(7X)", 67'(c7_7), 67'(carry_out(7, xl << 3, ~xl, 1)));
      check("c6(7X)", 67'(c6_7), 67'(carry_out(6, xl << 3, ~xl, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
