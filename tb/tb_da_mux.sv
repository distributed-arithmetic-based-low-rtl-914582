// Testbench for da_mux: random table contents, every select value; address 0
// must give zero, address k entry k.
module tb_da_mux;
  localparam int W = 10, K = 4;
  int checks = 0, failures = 0;
  logic signed [W-1:0] table_q [1:(1<<K)-1];
  logic        [K-1:0] sel;
  logic signed [W-1:0] y;

  da_mux #(.W(W), .K(K)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int k = 1; k < (1 << K); k++) table_q[k] = W'($urandom);
      for (int s = 0; s < (1 << K); s++) begin
        sel = K'(s);
        #1;
        checks++;
        if (y !== ((s == 0) ? W'(0) : table_q[s])) begin
          failures++;
          $display("FAIL sel=%0d y=%0d", s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
