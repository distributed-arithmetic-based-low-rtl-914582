// Testbench for da_inner_product: the testbench plays the controller (L bit
// cycles per period, slices LSB first) and holds four random weights per
// period. Each period's result, read after the next sample_en as
// sum_word + 2*carry_word + 1, must equal floor(sum_k w_k x_k / 2^(L-1)) for
// the samples loaded before that period, computed with integers.
module tb_da_inner_product;
  localparam int L = 8, B = 8, K = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_en, first, sign_ctrl;
  logic signed [B-1:0]   x_new;
  logic        [K-1:0]   slice;
  logic signed [B-1:0]   x_taps [K];
  logic signed [B-1:0]   x_oldest;
  logic signed [B+1:0]   sum_word, carry_word;
  int hist [K];
  logic signed [L-1:0] w [K];

  da_inner_product #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, pending, got;
    bit have_pending;
    for (int j = 0; j < K; j++) begin hist[j] = 0; w[j] = '0; end
    sample_en = 0; first = 0; sign_ctrl = 0; x_new = '0; slice = '0;
    have_pending = 0; pending = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load the first sample
    x_new = B'($urandom); sample_en = 1; sign_ctrl = 1;
    @(negedge clk);
    for (int j = K - 1; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = int'(x_new);
    for (int r = 0; r < 600; r++) begin
      for (int j = 0; j < K; j++) begin
        if (r % 5 == 0)      w[j] = (j % 2) ? 8'sh80 : 8'sh7f;   // extremes
        else                 w[j] = L'($urandom);
      end
      expected = 0;
      for (int j = 0; j < K; j++) expected += int'(w[j]) * hist[j];
      expected = expected >>> (L - 1);
      for (int l = 0; l < L; l++) begin
        for (int j = 0; j < K; j++) slice[j] = w[j][l];
        first     = (l == 0);
        sign_ctrl = (l == L - 1);
        sample_en = sign_ctrl;
        if (sample_en) x_new = (r % 11 == 0) ? 8'sh80 : B'($urandom);
        #1;
        if (l == 0 && have_pending) begin
          got = int'(sum_word) + 2 * int'(carry_word) + 1;
          checks++;
          if (got != pending) begin
            failures++;
            $display("FAIL period %0d: got %0d expected %0d", r - 1, got, pending);
          end
        end
        @(negedge clk);
      end
      for (int j = K - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = int'(x_new);
      for (int j = 0; j < K; j++) begin
        checks++;
        if (int'(x_taps[j]) != hist[j]) begin failures++; $display("FAIL x_taps[%0d]", j); end
      end
      pending = expected; have_pending = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
