// DA-based delayed-LMS adaptive FIR filter (top level).
//
// Filter of N taps (a multiple of four) with L-bit samples and weights, all
// two's-complement fractions. The inner product y = sum_k w_k x(n-k) is
// computed without multipliers by distributed arithmetic: N/4 four-point
// blocks each keep a table of the fifteen partial sums of their four samples
// and, over L bit cycles, accumulate the table entries addressed by the weight
// bit slices in carry-save form. The final adder resolves the carry-save words
// (input carry 1 per block) into y(n), the integer part of the inner product
// (truncated per four-tap block); e(n) = d(n) - y(n). The weight update
// replaces the multiplication mu*e*x by a shift: only the sign and the leading
// one of e are kept, a priority encoder turns the leading one into the shift
// t, and N barrel shifters with adder/subtractor cells add or subtract
// x_k >> (t + 1 + log2 N + MU_I) to the weights (mu = 2^-MU_I / N; the
// default MU_I = 0 gives mu = 1/N).
//
// Timing: a sample period is L cycles of clk. x_in and d_in are taken in the
// cycle where sample_en is high. During the following period the blocks form
// the inner product of that sample's vector with the current weights; at the
// next sample_en its carry-save words are captured, and for one whole period
// y_out / e_out show y(n) and e(n) (y_valid high). At the sample_en that ends
// that period the weights take the update from e(n) and x(n), so the
// adaptation delay is one sample: w(n+1) = w(n) + mu*e(n-1)*x(n-1).
//
// Structure, slice order, sign control, carry-save accumulation, the error
// decoding and mu = 1/N follow the document. The single clock with a
// one-in-L enable standing in for the slow clock, the number formats, the
// error saturation, the chaining of blocks for N > 4, reset and the
// one-sample adaptation delay are this design's choices. The two concurrent
// assertions at the end use rst_n as their disable condition; the linter
// reports that as a synchronous use of the asynchronous reset, but it is not
// logic and adds no flip-flop.
module da_lms_filter
  import da_lms_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned L = DEFAULT_L,
  parameter int unsigned MU_I = 0,           // step size mu = 2^-MU_I / N
  localparam int unsigned M  = N / TAPS_PER_BLOCK,
  localparam int unsigned SW = L + $clog2(TAPS_PER_BLOCK),  // L+2: sum / carry words
  localparam int unsigned YW = SW + 1 + $clog2(M),
  localparam int unsigned TW = $clog2(L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [L-1:0]  x_in,
  input  logic signed [L-1:0]  d_in,
  output logic                 sample_en,
  output logic                 y_valid,
  output logic signed [YW-1:0] y_out,
  output logic signed [YW:0]   e_out,
  output logic signed [L-1:0]  w_out [N]
);

  localparam int unsigned K = TAPS_PER_BLOCK;

  // ---------------------------------------------------------------- control
  logic [TW-1:0] bit_idx;
  logic          first, sign_ctrl;

  da_controller #(.L(L)) u_ctrl (.clk, .rst_n, .bit_idx, .first, .sign_ctrl, .sample_en);

  // ------------------------------------------------------- inner products
  logic signed [L-1:0]  w      [N];
  logic signed [L-1:0]  x_taps [N];
  logic signed [L-1:0]  x_chain [M+1];
  logic signed [SW-1:0] sum_words   [M];
  logic signed [SW-1:0] carry_words [M];

  assign x_chain[0] = x_in;

  for (genvar j = 0; j < M; j++) begin : g_blk
    logic        [K-1:0] slice;
    logic signed [L-1:0] taps [K];

    for (genvar i = 0; i < K; i++) begin : g_slice
      assign slice[i]         = w[K*j + i][bit_idx];
      assign x_taps[K*j + i]  = taps[i];
    end

    da_inner_product #(.B(L)) u_ip (
      .clk, .rst_n, .sample_en, .first, .sign_ctrl,
      .x_new(x_chain[j]), .slice, .x_taps(taps), .x_oldest(x_chain[j+1]),
      .sum_word(sum_words[j]), .carry_word(carry_words[j])
    );
  end

  // ------------------------------------- slow-rate pipeline registers
  // d_q pairs d with the sample just loaded into the tables; d_err / x_upd
  // pair it with the carry-save words captured one period later.
  logic signed [L-1:0] d_q, d_err;
  logic signed [L-1:0] x_upd [N];
  logic                loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q     <= '0;
      d_err   <= '0;
      loaded  <= 1'b0;
      y_valid <= 1'b0;
      for (int k = 0; k < int'(N); k++) x_upd[k] <= '0;
    end else if (sample_en) begin
      d_q     <= d_in;
      d_err   <= d_q;
      loaded  <= 1'b1;
      y_valid <= loaded;
      for (int k = 0; k < int'(N); k++) x_upd[k] <= x_taps[k];
    end
  end

  // ------------------------------------------- final adder and error
  logic          e_sign, e_zero;
  logic [L-2:0]  e_mag;
  logic [TW-1:0] t;

  final_adder #(.W(SW), .M(M)) u_fadd (.sum_words, .carry_words, .y(y_out));

  error_unit #(.L(L), .YW(YW)) u_err (.d(d_err), .y(y_out), .e(e_out), .sign(e_sign), .mag(e_mag));

  shift_control #(.L(L)) u_tgen (.mag(e_mag), .t, .zero(e_zero));

  // ----------------------------------------------------- weight update
  weight_increment #(.N(N), .L(L), .PRESHIFT(1 + $clog2(N) + MU_I)) u_winc (
    .clk, .rst_n, .sample_en, .upd_en(y_valid), .x_upd, .t, .zero(e_zero), .sign(e_sign), .w
  );

  assign w_out = w;

  // N must be a whole number of four-point blocks.
  initial assert (N % K == 0 && N > 0) else $error("N must be a multiple of 4");

  // The shift word is all ones exactly when the error is zero, and the
  // sample strobe never lasts more than one cycle.
  assert property (@(posedge clk) disable iff (!rst_n) e_zero == (t == TW'(L - 1)));
  assert property (@(posedge clk) disable iff (!rst_n) sample_en |=> !sample_en);

endmodule
