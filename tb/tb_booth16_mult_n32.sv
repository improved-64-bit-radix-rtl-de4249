// tb_booth16_mult_n32: end-to-end test of the multiplier built for 32-bit
// operands (N = 32: 8 partial-product rows, a two-level 4:2 tree), in both
// pipeline forms.
//
// A stream of operand pairs, with the multiplier's top 5-bit window swept over
// all 32 strings and random bubbles in in_valid, goes to a two-stage and a
// three-stage instance. Every product is compared with a 64-bit
// multiplication and must appear exactly 2 or 3 rising edges after its
// operands. Prints TB_RESULT.
module tb_booth16_mult_n32;
  localparam int N = 32;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid;
  logic [N-1:0]   x, y;
  logic           ov2, ov3;
  logic [2*N-1:0] p2, p3;
  int checks = 0, failures = 0;
  int cycle = 0;

  booth16_mult #(.N(N), .STAGES(2)) dut2 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                                          .x(x), .y(y), .out_valid(ov2), .p(p2));
  booth16_mult #(.N(N), .STAGES(3)) dut3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                                          .x(x), .y(y), .out_valid(ov3), .p(p3));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [2*N-1:0] e2_q [$], e3_q [$];
  int             c2_q [$], c3_q [$];

  always @(negedge clk) begin
    if (rst_n && ov2) begin
      logic [2*N-1:0] e; int c;
      checks++;
      if (e2_q.size() == 0) begin failures++; $display("FAIL 2-stage: spurious result"); end
      else begin
        e = e2_q.pop_front(); c = c2_q.pop_front();
        if (p2 !== e || cycle - c != 2) begin
          failures++; $display("FAIL 2-stage p=%h exp=%h lat=%0d", p2, e, cycle - c);
        end
      end
    end
    if (rst_n && ov3) begin
      logic [2*N-1:0] e; int c;
      checks++;
      if (e3_q.size() == 0) begin failures++; $display("FAIL 3-stage: spurious result"); end
      else begin
        e = e3_q.pop_front(); c = c3_q.pop_front();
        if (p3 !== e || cycle - c != 3) begin
          failures++; $display("FAIL 3-stage p=%h exp=%h lat=%0d", p3, e, cycle - c);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      logic [N-1:0] a, b;
      a = (t % 50 == 0) ? '1 : (t % 50 == 1) ? '0 : $urandom();
      b = (t % 70 == 0) ? '1 : $urandom();
      b[N-1:N-5] = 5'(t);
      @(negedge clk);
      in_valid = 1'b1; x = a; y = b;
      @(posedge clk);
      e2_q.push_back({{N{1'b0}}, a} * {{N{1'b0}}, b}); c2_q.push_back(cycle);
      e3_q.push_back({{N{1'b0}}, a} * {{N{1'b0}}, b}); c3_q.push_back(cycle);
      @(negedge clk);
      in_valid = 1'b0;
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    repeat (6) @(posedge clk);
    if (e2_q.size() != 0 || e3_q.size() != 0) begin
      failures++; $display("FAIL: results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
