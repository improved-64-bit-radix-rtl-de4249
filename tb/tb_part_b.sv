// tb_part_b: exhaustive test of the lower half of the short addition.
//
// All 128 values of x[6:0] and all 32 top windows are applied. The reference
// is the regular radix-16 partial product: its 7 low bits R = (|d|*X mod 128),
// inverted for a negative digit, plus its two's-complement one, plus bits 0..2
// of the top partial product at weight 16. z must be that sum modulo 128 and
// sel its carry out. C_M is fed the way the selector forms it from the
// odd-multiple adders (3X = 4X - X, 5X = 4X + X, 7X = 8X - X, 6X = 2*3X),
// computed here from x[6:0] alone. Prints TB_RESULT.
module tb_part_b;
  logic [4:0] win;
  logic [6:0] x7, z;
  logic       cm, sel;
  int checks = 0, failures = 0;

  part_b dut (.win(win), .x7(x7), .cm(cm), .z(z), .sel(sel));

  initial begin
    for (int w = 0; w < 32; w++)
      for (int xv = 0; xv < 128; xv++) begin
        int v, mag, r, s, nxm;
        logic neg, c;
        v = (w >> 1) + (w & 1) - ((w >> 4) & 1) * 16;
        neg = (v < 0);
        mag = neg ? -v : v;
        nxm = (~xv) & 127;
        case (mag)
          3: c = 1'((((xv << 2) & 127) + nxm + 1) >> 7);
          5: c = 1'((((xv << 2) & 127) + xv) >> 7);
          6: c = 1'((((xv << 2) & 63) + (nxm & 63) + 1) >> 6);
          7: c = 1'((((xv << 3) & 127) + nxm + 1) >> 7);
          default: c = 1'b0;
        endcase
        if (neg && mag inside {3, 5, 6, 7}) c = ~c;
        win = 5'(w); x7 = 7'(xv); cm = c;
        #1;
        r = (mag * xv) & 127;
        if (neg) r = r ^ 127;
        s = r + int'(neg) + ((((w >> 4) & 1) != 0) ? (xv & 7) * 16 : 0);
        checks++;
        if (z !== 7'(s) || sel !== s[7]) begin
          failures++;
          $display("FAIL win=%05b x=%0d z=%0d sel=%b exp z=%0d sel=%b", win, xv, z, sel, s & 127, s[7]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
