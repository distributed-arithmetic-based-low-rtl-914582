// Barrel shifter of the weight-increment block.
//
// y = x >>> (t + PRESHIFT): multiplies the input sample by mu * 2^(p-L+1),
// where p is the position of the error's leading one (t = L-2-p). With x, e
// and the weights read as L-bit fractions and mu = 1/N, a leading one at the
// top magnitude bit means |e| is about 1/2, so PRESHIFT = 1 + log2(N); a step
// size of 2^-i/N adds i to PRESHIFT, as the document suggests. Bits shifted
// out are dropped (rounding toward minus infinity). Combinational, built as a
// log-depth shifter by the synthesis tool.
module barrel_shifter #(
  parameter int unsigned B        = 8,
  parameter int unsigned TW       = 3,
  parameter int unsigned PRESHIFT = 3
) (
  input  logic signed [B-1:0]  x,
  input  logic        [TW-1:0] t,
  output logic signed [B-1:0]  y
);

  always_comb y = x >>> (32'(t) + PRESHIFT);

endmodule
