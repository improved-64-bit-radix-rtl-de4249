// tb_part_a: exhaustive test of the speculative upper half of the short
// addition.
//
// All values of y[3], y[N-1], x[7:3] and the carry-in are applied. The
// expected result is the plain sum, at bit positions N+3 and up, of the
// sign-extension bits of partial product 0 (s0 s0 s0 s0 then ~s0), the three
// constant ones at N+8..N+10, bits 3..7 of the top partial product and the
// carry-in, as a 9-bit number z[15:7]. Prints TB_RESULT.
module tb_part_a;
  logic       y3, ytop, sel;
  logic [4:0] x73;
  logic [8:0] z;
  int checks = 0, failures = 0;

  part_a dut (.y3(y3), .ytop(ytop), .x7_3(x73), .sel(sel), .z(z));

  initial begin
    for (int t = 0; t < 256; t++) begin
      int e;
      {y3, ytop, sel, x73} = 8'(t);
      #1;
      e = (y3 ? 15 : 16) + (ytop ? int'(x73) : 0) + int'(sel) + 7 * 32;
      checks++;
      if (z !== 9'(e)) begin
        failures++;
        $display("FAIL y3=%b ytop=%b x=%b sel=%b z=%b exp=%b", y3, ytop, x73, sel, z, 9'(e));
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
