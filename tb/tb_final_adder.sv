// Testbench for final_adder with one block (M = 1) and four blocks (M = 4):
// y must equal sum_j (sum_j + 2*carry_j + 1) for random signed words.
module tb_final_adder;
  localparam int W = 10;
  int checks = 0, failures = 0;
  logic signed [W-1:0]  s1 [1], c1 [1], s4 [4], c4 [4];
  logic signed [W:0]    y1;
  logic signed [W+2:0]  y4;

  final_adder #(.W(W), .M(1)) dut1 (.sum_words(s1), .carry_words(c1), .y(y1));
  final_adder #(.W(W), .M(4)) dut4 (.sum_words(s4), .carry_words(c4), .y(y4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2000; r++) begin
      int e1, e4;
      // keep each block's value inside the range a real accumulation produces
      s1[0] = W'($urandom); c1[0] = $signed(W'($urandom)) >>> 1;
      e1 = int'(s1[0]) + 2 * int'(c1[0]) + 1;
      e4 = 0;
      for (int j = 0; j < 4; j++) begin
        s4[j] = W'($urandom); c4[j] = $signed(W'($urandom)) >>> 1;
        e4 += int'(s4[j]) + 2 * int'(c4[j]) + 1;
      end
      #1;
      checks += 2;
      if (int'(y1) != e1) begin failures++; $display("FAIL M=1 y=%0d exp %0d", y1, e1); end
      if (int'(y4) != e4) begin failures++; $display("FAIL M=4 y=%0d exp %0d", y4, e4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
