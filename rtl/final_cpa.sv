// final_cpa: final carry-propagate adder (CPA stage).
//
// Adds the sum and carry words left by the reduction tree into the product,
// modulo 2^W. The document only requires a carry-propagate addition here; a
// plain word-level adder is used so that synthesis can pick the architecture.
// Purely combinational.
module final_cpa #(
  parameter int unsigned W = 128  // word width (2N)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  assign s = a + b;

endmodule
