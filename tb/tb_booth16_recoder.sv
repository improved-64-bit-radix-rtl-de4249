// tb_booth16_recoder: exhaustive test of the radix-16 Booth recoder.
//
// All 32 windows {y[4i+3..4i], y[4i-1]} are applied. The expected digit is
// worked out as the group value v = y[4i+3..4i] plus the incoming transfer
// y[4i-1], minus 16 when v >= 8 (the outgoing transfer); the recoder must
// give its sign and a one-hot magnitude (no line for zero). Prints TB_RESULT.
module tb_booth16_recoder;
  import booth16_pkg::*;

  logic [4:0] win;
  r16_digit_t digit;
  int checks = 0, failures = 0;

  booth16_recoder dut (.win(win), .digit(digit));

  initial begin
    for (int w = 0; w < 32; w++) begin
      int v, mag;
      logic [7:0] oh;
      win = 5'(w);
      #1;
      v = (w >> 1) + (w & 1);
      if ((w >> 1) >= 8) v -= 16;
      mag = (v < 0) ? -v : v;
      oh = (mag == 0) ? 8'h00 : 8'(1 << (mag - 1));
      checks++;
      if (digit.neg !== (v < 0) || digit.sel !== oh) begin
        failures++;
        $display("FAIL win=%05b exp=%0d got neg=%b sel=%b", win, v, digit.neg, digit.sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
