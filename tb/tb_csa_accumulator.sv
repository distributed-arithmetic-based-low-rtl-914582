// Testbench for csa_accumulator: feeds L random partial sums per period (the
// last one with sign_ctrl) and checks sum_word + 2*carry_word + 1 against
// floor(sum_l 2^l * s_l * P_l / 2^(L-1)) computed with integers, s_l = -1 on
// the MSB slice. Includes all-extreme periods.
module tb_csa_accumulator;
  localparam int L = 8, W = 10;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic first, sign_ctrl, sample_en;
  logic signed [W-1:0] p_in, sum_word, carry_word;

  csa_accumulator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint total, expected, got;
    first = 1'b0; sign_ctrl = 1'b0; sample_en = 1'b0; p_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 1000; r++) begin
      total = 0;
      for (int l = 0; l < L; l++) begin
        int p;
        case (r % 4)
          0: p = $signed(W'($urandom));
          1: p = -(1 << (W - 1));                 // most negative everywhere
          2: p = (1 << (W - 1)) - 1;              // most positive everywhere
          default: p = $signed(W'($urandom)) >>> ($urandom % W);
        endcase
        p_in      = W'(p);
        first     = (l == 0);
        sign_ctrl = (l == L - 1);
        sample_en = sign_ctrl;
        total    += (l == L - 1) ? -(longint'(p) <<< l) : (longint'(p) <<< l);
        @(negedge clk);
      end
      expected = total >>> (L - 1);
      got = longint'(sum_word) + 2 * longint'(carry_word) + 1;
      checks++;
      if (got != expected) begin
        failures++;
        $display("FAIL period %0d: got %0d expected %0d", r, got, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
