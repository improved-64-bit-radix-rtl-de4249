// tb_booth16_mult_3stage: end-to-end test of the pipelined radix-16 Booth multiplier
// in its three-stage form (64 x 64, STAGES = 3: an extra register between
// the reduction tree and the final adder).
//
// The multiplier gets a stream of operand pairs, with random bubbles in
// in_valid: corner values (0, 1, all ones, single bits, alternating bits),
// multiplier windows chosen to hit every top-digit string of the short
// addition, and random words. Every product is compared with a plain 128-bit
// multiplication, and every result must appear exactly LAT rising edges
// after its operands (LAT = 3 cycles). The test also counts how often the
// mechanisms of the height-reduction logic were exercised (part B carry into
// part A, a non-zero C_M, negative top regular digit, transfer digit of 1,
// each of the four re-split radix-4 strings, a carry out of the whole short
// addition) and fails if any never happened. Prints TB_RESULT at the end.
module tb_booth16_mult_3stage;

  localparam int N   = 64;
  localparam int NOP = 6000;
  localparam int LAT = 3;   // rising edges from operands to product

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid;
  logic [N-1:0]   x, y;
  logic           ov2;
  logic [2*N-1:0] p2;

  int checks = 0, failures = 0;

  booth16_mult #(.STAGES(3)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
                     .out_valid(ov2), .p(p2));

  always #5 clk = ~clk;

  // expected products with the cycle they were issued
  logic [2*N-1:0] exp_q [$];
  int             cyc_q [$];
  int             cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_sel = 0, n_cm = 0, n_neg = 0, n_tr = 0, n_cout = 0;
  int n_s00100 = 0, n_s11011 = 0, n_s01011 = 0, n_s10100 = 0;

  // Mechanisms of the short addition, worked out from the operands: the
  // carry out of the low 7-bit part (sel), the carry the regular partial
  // product already holds (C_M) and the carry out of the whole 16-bit sum.
  task automatic count_mechanisms(input logic [N-1:0] a, input logic [N-1:0] b);
    int w, v, mag, xv, nxm, r, s, hi;
    logic neg, c;
    w   = int'(b[N-1:N-5]);
    xv  = int'(a[6:0]);
    nxm = (~xv) & 127;
    v   = (w >> 1) + (w & 1) - ((w >> 4) & 1) * 16;
    neg = (v < 0);
    mag = neg ? -v : v;
    case (mag)
      3: c = 1'((((xv << 2) & 127) + nxm + 1) >> 7);
      5: c = 1'((((xv << 2) & 127) + xv) >> 7);
      6: c = 1'((((xv << 2) & 63) + (nxm & 63) + 1) >> 6);
      7: c = 1'((((xv << 3) & 127) + nxm + 1) >> 7);
      default: c = 1'b0;
    endcase
    if (neg && mag inside {3, 5, 6, 7}) c = ~c;
    r = (mag * xv) & 127;
    if (neg) r = r ^ 127;
    s = r + int'(neg) + (b[N-1] ? (xv & 7) * 16 : 0);
    hi = (b[3] ? 15 : 16) + (b[N-1] ? int'(a[7:3]) : 0) + (s >> 7) + 7 * 32;
    n_sel  += s >> 7;
    n_cm   += int'(c);
    n_neg  += int'(neg);
    n_tr   += int'(b[N-1]);
    n_cout += (hi >> 8) & 1;
    n_s00100 += int'(w == 'b00100);
    n_s11011 += int'(w == 'b11011);
    n_s01011 += int'(w == 'b01011);
    n_s10100 += int'(w == 'b10100);
  endtask

  // result checkers
  always @(negedge clk) begin
    if (rst_n && ov2) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected out_valid");
      end else begin
        logic [2*N-1:0] e; int c;
        e = exp_q.pop_front(); c = cyc_q.pop_front();
        if (p2 !== e || cycle - c != LAT) begin
          failures++;
          $display("FAIL: p=%h exp=%h latency=%0d", p2, e, cycle - c);
        end
      end
    end
  end

  function automatic logic [N-1:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  function automatic logic [N-1:0] special(input int k);
    case (k % 8)
      0: return '0;
      1: return 64'd1;
      2: return '1;
      3: return 64'h8000_0000_0000_0000;
      4: return 64'hAAAA_AAAA_AAAA_AAAA;
      5: return 64'h5555_5555_5555_5555;
      6: return 64'h7FFF_FFFF_FFFF_FFFF;
      default: return 64'h8888_8888_8888_8888;
    endcase
  endfunction

  task automatic issue(input logic [N-1:0] a, input logic [N-1:0] b);
    // drive between edges, sampled at the next rising edge
    @(negedge clk);
    in_valid = 1'b1; x = a; y = b;
    @(posedge clk);
    count_mechanisms(a, b);
    exp_q.push_back({{N{1'b0}}, a} * {{N{1'b0}}, b});
    cyc_q.push_back(cycle);
    @(negedge clk);
    in_valid = 1'b0;
    if ($urandom_range(3) == 0) @(negedge clk);  // occasional bubble
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // corner values
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) issue(special(i), special(j));
    // every top window with random and corner multiplicands
    for (int w = 0; w < 32; w++)
      for (int k = 0; k < 40; k++) begin
        logic [N-1:0] a, b;
        a = (k < 8) ? special(k) : rnd64();
        b = rnd64();
        b[N-1:N-5] = 5'(w);
        issue(a, b);
      end
    // random
    for (int i = 0; i < NOP - 64 - 32 * 40; i++) issue(rnd64(), rnd64());
    repeat (6) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL: %0d results never appeared", exp_q.size());
    end
    $display("mechanisms: sel=%0d cm=%0d neg15=%0d transfer=%0d cout=%0d 00100=%0d 11011=%0d 01011=%0d 10100=%0d",
             n_sel, n_cm, n_neg, n_tr, n_cout, n_s00100, n_s11011, n_s01011, n_s10100);
    if (n_sel == 0 || n_cm == 0 || n_neg == 0 || n_tr == 0 || n_cout == 0 ||
        n_s00100 == 0 || n_s11011 == 0 || n_s01011 == 0 || n_s10100 == 0) begin
      failures++; $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
