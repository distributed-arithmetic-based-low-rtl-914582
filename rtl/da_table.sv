// DA table: the fifteen partial sums of the four most recent input samples.
//
// Entry k (1..15) holds sum_j k_j * x(n-j), where k_j is bit j of k, so the
// current weight bit slice {w3l w2l w1l w0l} can be used directly as the
// address. Address 0 (the empty sum) is not stored.
//
// When a new sample arrives (load = 1, the slow-rate enable) every sample
// moves one tap older. The sums that do not contain the newest sample are then
// the sums the table already held one address lower:
//   even k : T'[k] = T[k >> 1]            (register move, no adder)
//   k = 1  : T'[1] = x(n)
//   odd k>1: T'[k] = x(n) + T[k >> 1]     (seven adders for K = 4)
// This is how fifteen registers and seven parallel adders keep the table
// current, as the document describes; the recurrence itself is this design's
// reading of that description. Entries are B + log2(K) bits wide so no sum
// overflows. x_taps gives the singleton entries (the samples themselves) and
// x_oldest the sample that leaves the table at the next load, used to chain
// tables for filters longer than K taps.
module da_table
  import da_lms_pkg::*;
#(
  parameter int unsigned B = 8,
  parameter int unsigned K = TAPS_PER_BLOCK,
  localparam int unsigned TW = B + $clog2(K)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic signed [B-1:0]         x_new,
  output logic signed [TW-1:0]        table_q [1:(1<<K)-1],
  output logic signed [B-1:0]         x_taps  [K],
  output logic signed [B-1:0]         x_oldest
);

  localparam int unsigned SIZE = 1 << K;

  logic signed [TW-1:0] table_d [1:SIZE-1];

  always_comb begin
    table_d[1] = TW'(x_new);
    for (int unsigned k = 2; k < SIZE; k++) begin
      if (k % 2 == 0) table_d[k] = table_q[k >> 1];
      else            table_d[k] = TW'(x_new) + table_q[k >> 1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 1; k < SIZE; k++) table_q[k] <= '0;
    end else if (load) begin
      for (int unsigned k = 1; k < SIZE; k++) table_q[k] <= table_d[k];
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < K; j++) x_taps[j] = table_q[1 << j][B-1:0];
    x_oldest = table_q[1 << (K-1)][B-1:0];
  end

endmodule
