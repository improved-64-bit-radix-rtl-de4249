// tb_final_cpa: test of the final 128-bit carry-propagate adder with random
// words and long carry chains (all ones plus one, alternating patterns); the
// reference is the sum worked out on 129 bits and truncated. Prints TB_RESULT.
module tb_final_cpa;
  logic [127:0] a, b, s;
  int checks = 0, failures = 0;

  final_cpa #(.W(128)) dut (.a(a), .b(b), .s(s));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [128:0] e;
      case (t % 4)
        0: begin a = '1; b = 128'(t); end
        1: begin a = {4{32'hAAAA_AAAA}}; b = {4{32'h5555_5555}} + 128'(t & 1); end
        default: begin
          a = {$urandom(), $urandom(), $urandom(), $urandom()};
          b = {$urandom(), $urandom(), $urandom(), $urandom()};
        end
      endcase
      #1;
      e = {1'b0, a} + {1'b0, b};
      checks++;
      if (s !== e[127:0]) begin failures++; $display("FAIL a=%h b=%h s=%h", a, b, s); end
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
