// booth16_mult: pipelined N x N unsigned radix-16 Booth multiplier with a
// 16-row (N/4-row) partial-product array.
//
// Datapath: input registers for X and Y, then PPGEN (radix-16 recoding,
// multiple generation and the short addition that removes the 17th row),
// a pipeline register holding the N/4 partial-product rows, TREE (4:2
// carry-save levels down to two words) and CPA (the final carry-propagate
// adder). STAGES = 2 is the two-stage pipeline, with the only internal
// register in front of the tree; STAGES = 3 adds a register between the tree
// and the CPA. Both placements follow the document; the input registers come
// from its timing analysis, which starts at registered X and Y.
//
// Timing: an operand pair presented with in_valid at a rising edge gives its
// product on p, with out_valid high, STAGES rising edges later (p is the
// combinational output of the CPA, to be captured by the consumer). A new pair
// can be accepted every cycle. The valid signals and the active-low
// synchronous reset, which clears only the valid pipeline, are this design's
// additions.
module booth16_mult #(
  parameter int unsigned N      = 64,  // operand width, multiple of 4
  parameter int unsigned STAGES = 2    // 2 or 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           out_valid,
  output logic [2*N-1:0] p
);

  localparam int unsigned R = N / 4;
  localparam int unsigned W = 2 * N;

  // ---- input registers ----
  logic [N-1:0] x_q, y_q;
  logic         v1;

  always_ff @(posedge clk) begin
    x_q <= x;
    y_q <= y;
  end

  // ---- stage 1: PPGEN ----
  logic [W-1:0] rows   [R];
  logic [W-1:0] rows_q [R];
  logic         v2;

  ppgen #(.N(N)) u_ppgen (.x(x_q), .y(y_q), .rows(rows));

  always_ff @(posedge clk) rows_q <= rows;

  // ---- stage 2: TREE ----
  logic [W-1:0] t_sum, t_carry;
  logic [W-1:0] c_a, c_b;

  pp_tree #(.W(W), .ROWS(R)) u_tree (.rows(rows_q), .sum(t_sum), .carry(t_carry));

  if (STAGES == 3) begin : g_three
    logic [W-1:0] t_sum_q, t_carry_q;
    logic         v3;
    always_ff @(posedge clk) begin
      t_sum_q   <= t_sum;
      t_carry_q <= t_carry;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) v3 <= 1'b0;
      else        v3 <= v2;
    end
    assign c_a       = t_sum_q;
    assign c_b       = t_carry_q;
    assign out_valid = v3;
  end else begin : g_two
    assign c_a       = t_sum;
    assign c_b       = t_carry;
    assign out_valid = v2;
  end

  // ---- CPA ----
  final_cpa #(.W(W)) u_cpa (.a(c_a), .b(c_b), .s(p));

  // ---- valid pipeline ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
    end
  end

  initial assert (STAGES == 2 || STAGES == 3)
    else $error("booth16_mult: STAGES must be 2 or 3");
  initial assert (N % 4 == 0 && N >= 16)
    else $error("booth16_mult: N must be a multiple of 4, at least 16");

endmodule
