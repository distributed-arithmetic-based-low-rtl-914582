// Bit-cycle controller of the DA adaptive filter.
//
// One sample period is L cycles of the bit clock. The counter bit_idx walks
// the weight bit slices from the LSB (0) to the MSB (L-1). 'first' marks slice
// 0, where the carry-save accumulator starts from zero; 'sign_ctrl' marks the
// MSB slice, whose partial sum is subtracted (two's-complement sign weight).
// 'sample_en' is high in that same last cycle: it is the clock enable of every
// register that runs at the slow sample rate (DA table, weights, error and
// output registers), so all of them change once per L bit cycles.
//
// The document runs the accumulator on a fast bit clock and everything else on
// a slower clock. Here the slower clock is a one-in-L enable on the single bit
// clock, which is this design's choice; reset (asynchronous, active low) is
// also its own choice.
module da_controller #(
  parameter int unsigned L = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [$clog2(L)-1:0] bit_idx,
  output logic                 first,
  output logic                 sign_ctrl,
  output logic                 sample_en
);

  localparam logic [$clog2(L)-1:0] LAST = $clog2(L)'(L - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              bit_idx <= '0;
    else if (bit_idx == LAST) bit_idx <= '0;
    else                     bit_idx <= bit_idx + 1'b1;
  end

  always_comb begin
    first     = (bit_idx == '0);
    sign_ctrl = (bit_idx == LAST);
    sample_en = sign_ctrl;
  end

endmodule
