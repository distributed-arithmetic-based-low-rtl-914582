// Carry-save shift accumulator with sign control.
//
// Computes sum_l 2^l * s_l * P_l over the L weight bit slices, fed LSB first,
// where P_l is the partial sum read from the DA table and s_l = -1 for the MSB
// slice (sign_ctrl = 1) and +1 otherwise. One row of W full adders per bit
// cycle reduces three words: the previous sum word shifted right by one, the
// previous carry word, and the partial sum. The carry word keeps weight two,
// so shifting only the sum word halves the stored value exactly; the bit that
// leaves the sum word is a fraction bit of the product and is dropped. Sign
// bits go through the full adders like any other bit: for the signed readings
// of the words, sum + 2*carry equals the signed total exactly, so no carry
// ever has to ripple during accumulation.
//
// For the MSB slice the partial sum is XORed with sign_ctrl (one's
// complement); the missing +1 is the input carry of the final adder. In that
// last cycle (sample_en = 1) the unshifted sum and carry words are captured in
// sum_word / carry_word, where they stay for the whole next sample period:
//   value = sum_word + 2*carry_word + 1 = floor(total / 2^(L-1)).
// 'first' starts a new accumulation from zero. The structure follows the
// document; the capture registers and reset are this design's choices.
module csa_accumulator #(
  parameter int unsigned W = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                first,
  input  logic                sign_ctrl,
  input  logic                sample_en,
  input  logic signed [W-1:0] p_in,
  output logic signed [W-1:0] sum_word,
  output logic signed [W-1:0] carry_word
);

  logic signed [W-1:0] s_q, c_q;         // running sum and carry words
  logic signed [W-1:0] s_half;
  logic signed [W-1:0] a, b, p, s, cy;

  always_comb begin
    s_half = s_q >>> 1;                  // arithmetic: halves the signed sum word
    a  = first ? '0 : s_half;
    b  = first ? '0 : c_q;
    p  = p_in ^ {W{sign_ctrl}};
    s  = a ^ b ^ p;
    cy = (a & b) | (a & p) | (b & p);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q        <= '0;
      c_q        <= '0;
      sum_word   <= '0;
      carry_word <= '0;
    end else begin
      s_q <= s;
      c_q <= cy;
      if (sample_en) begin
        sum_word   <= s;
        carry_word <= cy;
      end
    end
  end

endmodule
