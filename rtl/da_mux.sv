// 16:1 multiplexer of the four-point inner-product block.
//
// The weight bit slice 'sel' = {w3l w2l w1l w0l} addresses one of the fifteen
// DA-table registers; address 0 selects the constant zero, the sixteenth
// input, since the empty sum is not stored. Purely combinational.
module da_mux
  import da_lms_pkg::*;
#(
  parameter int unsigned W = 10,
  parameter int unsigned K = TAPS_PER_BLOCK
) (
  input  logic signed [W-1:0] table_q [1:(1<<K)-1],
  input  logic        [K-1:0] sel,
  output logic signed [W-1:0] y
);

  always_comb begin
    y = '0;
    for (int unsigned k = 1; k < (1 << K); k++)
      if (sel == K'(k)) y = table_q[k];
  end

endmodule
