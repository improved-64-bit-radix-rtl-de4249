// tb_pp_tree: test of the 4:2 carry-save reduction tree.
//
// Random 128-bit rows (with all-ones and zero rows mixed in) go into a 16-row
// tree and a 64-bit, 8-row tree; sum + carry must equal the sum of the rows
// modulo 2^W. Prints TB_RESULT.
module tb_pp_tree;
  logic [127:0] r16 [16];
  logic [127:0] s16, c16;
  logic [63:0]  r8 [8];
  logic [63:0]  s8, c8;
  int checks = 0, failures = 0;

  pp_tree #(.W(128), .ROWS(16)) dut16 (.rows(r16), .sum(s16), .carry(c16));
  pp_tree #(.W(64),  .ROWS(8))  dut8  (.rows(r8),  .sum(s8),  .carry(c8));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [127:0] e16;
      logic [63:0]  e8;
      e16 = '0; e8 = '0;
      for (int r = 0; r < 16; r++) begin
        r16[r] = (t % 7 == 0) ? '1 : (t % 11 == 0) ? '0 :
                 {$urandom(), $urandom(), $urandom(), $urandom()};
        e16 += r16[r];
      end
      for (int r = 0; r < 8; r++) begin
        r8[r] = (t % 5 == 0) ? '1 : {$urandom(), $urandom()};
        e8 += r8[r];
      end
      #1;
      checks += 2;
      if (s16 + c16 !== e16) begin failures++; $display("FAIL 16-row t=%0d", t); end
      if (s8 + c8 !== e8)    begin failures++; $display("FAIL 8-row t=%0d", t); end
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
