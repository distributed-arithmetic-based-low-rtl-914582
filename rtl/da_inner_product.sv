// Four-point DA inner-product block.
//
// Holds the DA table of the four most recent samples, the 16:1 multiplexer
// addressed by the weight bit slice {w3l w2l w1l w0l}, and the carry-save
// accumulator. Over the L bit cycles of one sample period the slices are
// applied LSB first; at the end of the period (sample_en) the sum and carry
// words of sum_k w_k x_k are captured and the table takes in x_new. The table
// thus holds x(n)..x(n-3) during the period after x(n) was loaded, and the
// words describing that period's inner product appear after the following
// sample_en. Structure as in the document; sample width B = L is assumed.
module da_inner_product
  import da_lms_pkg::*;
#(
  parameter int unsigned B = 8,
  localparam int unsigned K  = TAPS_PER_BLOCK,
  localparam int unsigned TW = B + $clog2(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_en,
  input  logic                 first,
  input  logic                 sign_ctrl,
  input  logic signed [B-1:0]  x_new,
  input  logic        [K-1:0]  slice,
  output logic signed [B-1:0]  x_taps [K],
  output logic signed [B-1:0]  x_oldest,
  output logic signed [TW-1:0] sum_word,
  output logic signed [TW-1:0] carry_word
);

  logic signed [TW-1:0] table_q [1:(1<<K)-1];
  logic signed [TW-1:0] partial;

  da_table #(.B(B), .K(K)) u_table (
    .clk, .rst_n, .load(sample_en), .x_new, .table_q, .x_taps, .x_oldest
  );

  da_mux #(.W(TW), .K(K)) u_mux (.table_q, .sel(slice), .y(partial));

  csa_accumulator #(.W(TW)) u_acc (
    .clk, .rst_n, .first, .sign_ctrl, .sample_en, .p_in(partial), .sum_word, .carry_word
  );

endmodule
