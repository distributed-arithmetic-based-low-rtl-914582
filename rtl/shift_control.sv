// Control-word generator for the barrel shifters.
//
// Priority encoder over the error magnitude r_{L-2}..r_0: t is the number of
// zeros above the most significant one (for L = 8: r6 -> 0, r5 -> 1, ...,
// r0 -> 6) and t is all ones (7) when the magnitude is zero, which is also
// flagged on 'zero'. This is the decoding the document gives for L = 8,
// written for any L. Combinational.
module shift_control #(
  parameter int unsigned L  = 8,
  localparam int unsigned TW = $clog2(L)
) (
  input  logic [L-2:0]  mag,
  output logic [TW-1:0] t,
  output logic          zero
);

  always_comb begin
    t    = TW'(L - 1);
    zero = 1'b1;
    for (int i = 0; i <= int'(L) - 2; i++) begin
      if (mag[i]) begin
        t    = TW'(int'(L) - 2 - i);
        zero = 1'b0;
      end
    end
  end

endmodule
