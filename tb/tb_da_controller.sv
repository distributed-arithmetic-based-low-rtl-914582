// Testbench for da_controller: checks that bit_idx counts 0..L-1 and wraps,
// that first / sign_ctrl / sample_en mark slice 0 and slice L-1, and that the
// sample period is exactly L clock cycles.
module tb_da_controller;
  localparam int L = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(L)-1:0] bit_idx;
  logic first, sign_ctrl, sample_en;

  da_controller #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_idx, last_strobe, cyc;
    repeat (2) @(negedge clk);
    check(bit_idx == 0 && first && !sign_ctrl && !sample_en, "reset state");
    rst_n = 1'b1;
    expect_idx = 0; last_strobe = -1;
    for (cyc = 0; cyc < 10 * L; cyc++) begin
      @(negedge clk);
      expect_idx = (expect_idx + 1) % L;
      check(int'(bit_idx) == expect_idx, $sformatf("bit_idx %0d exp %0d", bit_idx, expect_idx));
      check(first == (expect_idx == 0), "first");
      check(sign_ctrl == (expect_idx == L - 1), "sign_ctrl");
      check(sample_en == sign_ctrl, "sample_en");
      if (sample_en) begin
        if (last_strobe >= 0) check(cyc - last_strobe == L, "sample period = L cycles");
        last_strobe = cyc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
