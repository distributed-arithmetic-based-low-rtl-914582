// Testbench for shift_control at L = 8: all 128 magnitudes. t must be 6 - p
// for a leading one at bit p (r6 -> 0 ... r0 -> 6) and 7 for zero.
module tb_shift_control;
  localparam int L = 8;
  int checks = 0, failures = 0;
  logic [L-2:0] mag;
  logic [2:0]   t;
  logic         zero;

  shift_control #(.L(L)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 128; m++) begin
      int p, texp;
      mag = 7'(m);
      #1;
      p = -1;
      for (int i = 0; i < 7; i++) if ((m >> i) & 1) p = i;
      texp = (p < 0) ? 7 : 6 - p;
      checks++;
      if (int'(t) != texp || zero != (m == 0)) begin
        failures++;
        $display("FAIL mag=%0d t=%0d exp %0d", m, t, texp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
