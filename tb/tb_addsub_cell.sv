// Testbench for addsub_cell: all weight / increment pairs for both signs;
// w_next must be (w + inc) or (w - inc) wrapped to 8 bits.
module tb_addsub_cell;
  int checks = 0, failures = 0;
  logic signed [7:0] w, inc, w_next;
  logic sub;

  addsub_cell #(.L(8)) dut (.*);

  function automatic int wrap8(int v);
    return int'($signed(8'(v)));
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b += 3)
        for (int s = 0; s < 2; s++) begin
          w = 8'(a); inc = 8'(b); sub = s[0];
          #1;
          checks++;
          if (int'(w_next) != wrap8(s ? a - b : a + b)) begin
            failures++; $display("FAIL w=%0d inc=%0d sub=%0d -> %0d", a, b, s, w_next);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
