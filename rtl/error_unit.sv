// Error computation: e(n) = d(n) - y(n), then sign and saturated magnitude.
//
// Only the position of the most significant one of |e| is used by the weight
// update, and the control-word logic looks at L-1 magnitude bits. The error is
// therefore limited to the L-bit range: mag = min(|e|, 2^(L-1) - 1), sign =
// e < 0. The full-width error is also given out. The saturation is this
// design's choice; the document only says that the magnitude is decoded.
// Combinational.
module error_unit #(
  parameter int unsigned L  = 8,
  parameter int unsigned YW = L + 3
) (
  input  logic signed [L-1:0]  d,
  input  logic signed [YW-1:0] y,
  output logic signed [YW:0]   e,
  output logic                 sign,
  output logic        [L-2:0]  mag
);

  localparam logic [YW:0] MAX_MAG = (YW+1)'((1 << (L-1)) - 1);

  logic [YW:0] abs_e;

  always_comb begin
    e     = (YW+1)'(d) - (YW+1)'(y);
    sign  = e[YW];
    abs_e = sign ? (YW+1)'(-e) : e;
    mag   = (abs_e > MAX_MAG) ? MAX_MAG[L-2:0] : abs_e[L-2:0];
  end

endmodule
