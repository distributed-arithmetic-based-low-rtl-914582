// Adder/subtractor cell of the weight-increment block.
//
// w_next = w + inc when sub = 0 (error positive) and w - inc when sub = 1
// (error negative), as the document describes. Overflow wraps modulo 2^L like
// a plain adder; the document does not discuss weight overflow.
// Combinational.
module addsub_cell #(
  parameter int unsigned L = 8
) (
  input  logic signed [L-1:0] w,
  input  logic signed [L-1:0] inc,
  input  logic                sub,
  output logic signed [L-1:0] w_next
);

  always_comb w_next = sub ? (w - inc) : (w + inc);

endmodule
