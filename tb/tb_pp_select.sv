// tb_pp_select: test of one regular partial-product slice (8:1 multiplexer
// and complementing XOR) at N = 64.
//
// For random and corner multiplicands, every digit -8..8 is applied with the
// odd multiples supplied as exact products. The expected partial product is
// |d|*X over 68 bits, bit-inverted for a negative digit, and the hot one must
// equal the sign. Prints TB_RESULT.
module tb_pp_select;
  import booth16_pkg::*;

  localparam int N = 64;

  logic [N-1:0] x;
  logic [N+2:0] m3, m5, m7;
  r16_digit_t   digit;
  logic [N+3:0] pp;
  logic         hot;
  int checks = 0, failures = 0;

  pp_select #(.N(N)) dut (.x(x), .m3(m3), .m5(m5), .m7(m7), .digit(digit), .pp(pp), .hot_one(hot));

  initial begin
    for (int t = 0; t < 300; t++) begin
      x = (t == 0) ? '1 : (t == 1) ? 64'd1 : {$urandom(), $urandom()};
      m3 = 67'(x) * 3; m5 = 67'(x) * 5; m7 = 67'(x) * 7;
      for (int d = -8; d <= 8; d++) begin
        logic [N+3:0] e;
        int mag;
        mag = (d < 0) ? -d : d;
        digit.neg = (d < 0);
        digit.sel = (mag == 0) ? 8'h00 : 8'(1 << (mag - 1));
        #1;
        e = 68'(x) * 68'(mag);
        if (d < 0) e = ~e;
        checks++;
        if (pp !== e || hot !== (d < 0)) begin
          failures++;
          $display("FAIL x=%h d=%0d pp=%h exp=%h", x, d, pp, e);
        end
      end
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
