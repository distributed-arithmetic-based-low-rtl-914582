// Testbench for barrel_shifter: every 8-bit input and every control word,
// with the pre-shift of 3 (mu = 1/4) and 5 (mu = 1/16). The result must be
// floor(x / 2^(t + PRESHIFT)).
module tb_barrel_shifter;
  int checks = 0, failures = 0;
  logic signed [7:0] x, y3, y5;
  logic        [2:0] t;

  barrel_shifter #(.B(8), .TW(3), .PRESHIFT(3)) dut3 (.x, .t, .y(y3));
  barrel_shifter #(.B(8), .TW(3), .PRESHIFT(5)) dut5 (.x, .t, .y(y5));

  function automatic int floor_div_pow2(int v, int s);
    int q;
    q = v / (1 << s);
    if (v < 0 && q * (1 << s) != v) q -= 1;
    return q;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -128; xv < 128; xv++) begin
      for (int tv = 0; tv < 8; tv++) begin
        x = 8'(xv); t = 3'(tv);
        #1;
        checks += 2;
        if (int'(y3) != floor_div_pow2(xv, tv + 3)) begin
          failures++; $display("FAIL x=%0d t=%0d y3=%0d", xv, tv, y3);
        end
        if (int'(y5) != floor_div_pow2(xv, tv + 5)) begin
          failures++; $display("FAIL x=%0d t=%0d y5=%0d", xv, tv, y5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
