// tb_ppgen: test of the partial-product generation stage at N = 64 and N = 32.
//
// Random and corner operand pairs, with the top multiplier window swept over
// all 32 strings, are applied to both sizes. The reduced array has N/4 rows;
// their sum modulo 2^(2N) must equal X*Y. For N = 64 the test also checks the
// array's height: the tallest column, counting bits seen set at least once
// over the whole run, must be exactly 16 high, and column 60 (where the
// short addition's z0 lands) must reach it. Prints TB_RESULT.
module tb_ppgen;
  logic [63:0]  x64, y64;
  logic [127:0] rows64 [16];
  logic [31:0]  x32, y32;
  logic [63:0]  rows32 [8];
  logic [127:0] seen [16];
  int checks = 0, failures = 0;

  ppgen #(.N(64)) dut64 (.x(x64), .y(y64), .rows(rows64));
  ppgen #(.N(32)) dut32 (.x(x32), .y(y32), .rows(rows32));

  function automatic logic [63:0] pick(input int k);
    case (k % 6)
      0: return '0;
      1: return '1;
      2: return 64'hAAAA_AAAA_AAAA_AAAA;
      3: return 64'h5555_5555_5555_5555;
      default: return {$urandom(), $urandom()};
    endcase
  endfunction

  initial begin
    for (int r = 0; r < 16; r++) seen[r] = '0;
    for (int t = 0; t < 8000; t++) begin
      logic [127:0] s64;
      logic [63:0]  s32;
      x64 = pick(t); y64 = pick(t / 6 + 1);
      y64[63:59] = 5'(t);
      x32 = 32'(pick(t + 3)); y32 = 32'(pick(t / 6 + 2));
      y32[31:27] = 5'(t / 3);
      #1;
      s64 = '0;
      for (int r = 0; r < 16; r++) begin
        s64 += rows64[r];
        seen[r] |= rows64[r];
      end
      s32 = '0;
      for (int r = 0; r < 8; r++) s32 += rows32[r];
      checks += 2;
      if (s64 !== {64'd0, x64} * {64'd0, y64}) begin
        failures++;
        $display("FAIL N=64 x=%h y=%h sum=%h", x64, y64, s64);
      end
      if (s32 !== {32'd0, x32} * {32'd0, y32}) begin
        failures++;
        $display("FAIL N=32 x=%h y=%h sum=%h", x32, y32, s32);
      end
    end
    begin
      int hmax, h60;
      hmax = 0;
      for (int col = 0; col < 128; col++) begin
        int h;
        h = 0;
        for (int r = 0; r < 16; r++) h += int'(seen[r][col]);
        if (h > hmax) hmax = h;
        if (col == 60) h60 = h;
      end
      // the tallest columns must be exactly 16 high: column 60 holds a bit
      // of every row (z0 of the short addition in the last row)
      checks++;
      if (hmax != 16 || h60 != 16) begin
        failures++;
        $display("FAIL array height: max %0d, column 60 %0d", hmax, h60);
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
