// Testbench for weight_increment (N = 4, L = 8): random input vectors,
// control words and signs; the weights must follow
// w_k <= w_k +/- floor(x_k / 2^(t+3)) on each enabled sample_en, stay put
// when sample_en or upd_en is low, and not move when the error is zero.
module tb_weight_increment;
  localparam int N = 4, L = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_en, upd_en, zero, sign;
  logic signed [L-1:0] x_upd [N];
  logic        [2:0]   t;
  logic signed [L-1:0] w [N];
  int model [N];

  weight_increment #(.N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_en = 0; upd_en = 0; zero = 0; sign = 0; t = '0;
    for (int k = 0; k < N; k++) begin x_upd[k] = '0; model[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3000; r++) begin
      sample_en = ($urandom % 4 != 0);
      upd_en    = ($urandom % 5 != 0);
      sign      = $urandom;
      t         = $urandom;
      zero      = (t == 3'd7);
      for (int k = 0; k < N; k++) x_upd[k] = L'($urandom);
      @(negedge clk);
      if (sample_en && upd_en && !zero)
        for (int k = 0; k < N; k++) begin
          int inc;
          inc = int'(x_upd[k]) >>> (int'(t) + 3);
          model[k] = int'($signed(8'(sign ? model[k] - inc : model[k] + inc)));
        end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(w[k]) != model[k]) begin
          failures++; $display("FAIL r=%0d w[%0d]=%0d exp %0d", r, k, w[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
