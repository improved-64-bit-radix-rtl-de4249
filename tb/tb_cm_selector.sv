// tb_cm_selector: exhaustive test of the C_M selector.
//
// All 32 top windows and all 16 combinations of the four adder carries are
// applied. The expected C_M comes from a digit-value table worked out here:
// |d| = 3, 5, 7 take the carry into bit 7 of that adder, |d| = 6 the carry
// into bit 6 of the 3X adder, others 0; a negative digit complements it.
// Prints TB_RESULT.
module tb_cm_selector;
  logic [4:0] win;
  logic       c73, c63, c75, c77, cm;
  int checks = 0, failures = 0;

  cm_selector dut (.win(win), .c7_3x(c73), .c6_3x(c63), .c7_5x(c75), .c7_7x(c77), .cm(cm));

  initial begin
    for (int w = 0; w < 32; w++)
      for (int c = 0; c < 16; c++) begin
        int v, mag;
        logic e;
        win = 5'(w);
        {c73, c63, c75, c77} = 4'(c);
        #1;
        v = (w >> 1) + (w & 1) - ((w >> 4) & 1) * 16;
        mag = (v < 0) ? -v : v;
        case (mag)
          3: e = c73;
          5: e = c75;
          6: e = c63;
          7: e = c77;
          default: e = 1'b0;
        endcase
        if (v < 0 && mag inside {3, 5, 6, 7}) e = ~e;
        checks++;
        if (cm !== e) begin
          failures++;
          $display("FAIL win=%05b carries=%04b cm=%b exp=%b", win, c, cm, e);
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
