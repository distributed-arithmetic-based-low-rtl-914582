// Final adder: turns the carry-save result of the inner-product blocks into
// the filter output.
//
// y = sum_j (sum_words[j] + 2*carry_words[j] + 1). The carry word is shifted
// left by one place (its weight is two) and each block contributes an input
// carry of 1, the +1 that completes the two's complement of its MSB slice.
// With M = 1 this is the single shift-add of the document's four-tap filter;
// for longer filters (M = N/4 blocks) the words of all blocks are added in one
// adder, which is this design's choice. Each block's words already stand for
// floor(partial inner product / 2^(L-1)), so for M > 1 the output is the sum
// of the blocks' truncated results (it can be up to M-1 LSBs below the
// truncated exact sum). Combinational; the output is W + 1 + log2(M) bits
// wide, enough for the largest inner product.
module final_adder #(
  parameter int unsigned W  = 10,
  parameter int unsigned M  = 1,
  localparam int unsigned YW = W + 1 + $clog2(M)
) (
  input  logic signed [W-1:0]  sum_words   [M],
  input  logic signed [W-1:0]  carry_words [M],
  output logic signed [YW-1:0] y
);

  always_comb begin
    y = '0;
    for (int unsigned j = 0; j < M; j++)
      y = y + YW'(sum_words[j]) + (YW'(carry_words[j]) <<< 1) + YW'(1);
  end

endmodule
