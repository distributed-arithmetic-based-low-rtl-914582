// Weight-increment block with the weight registers.
//
// N barrel shifters and N adder/subtractor cells. Each sample period, when an
// error is available (upd_en) the weights are updated at sample_en by the
// delayed-LMS rule
//   w_k <= w_k + sign(e) * (x_k >>> (t + PRESHIFT)),
// where x_upd is the input vector that produced the error, t is the control
// word from the error's leading one and PRESHIFT = 1 + log2(N) sets mu = 1/N.
// The error's sign selects add or subtract. A zero error (t all ones, 'zero')
// leaves the weights unchanged. Weights are L-bit two's-complement fractions
// and reset to zero. The structure follows the document; zero handling, the
// reset value and the enable are this design's choices.
module weight_increment #(
  parameter int unsigned N        = 4,
  parameter int unsigned L        = 8,
  parameter int unsigned PRESHIFT = 1 + $clog2(N),
  localparam int unsigned TW      = $clog2(L)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_en,
  input  logic                upd_en,
  input  logic signed [L-1:0] x_upd [N],
  input  logic        [TW-1:0] t,
  input  logic                zero,
  input  logic                sign,
  output logic signed [L-1:0] w [N]
);

  logic signed [L-1:0] shifted [N];
  logic signed [L-1:0] inc     [N];
  logic signed [L-1:0] w_next  [N];

  for (genvar k = 0; k < N; k++) begin : g_tap
    barrel_shifter #(.B(L), .TW(TW), .PRESHIFT(PRESHIFT)) u_bs (
      .x(x_upd[k]), .t, .y(shifted[k])
    );
    assign inc[k] = zero ? '0 : shifted[k];
    addsub_cell #(.L(L)) u_as (.w(w[k]), .inc(inc[k]), .sub(sign), .w_next(w_next[k]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                   w[k] <= '0;
      else if (sample_en && upd_en) w[k] <= w_next[k];
    end
  end

endmodule
