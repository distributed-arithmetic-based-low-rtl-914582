// Testbench for da_table: loads random samples and checks every one of the
// fifteen entries against the sum of the selected samples kept in a plain
// history, plus x_taps, x_oldest and that nothing changes without 'load'.
module tb_da_table;
  localparam int B = 8, K = 4, TW = B + 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [B-1:0]  x_new;
  logic signed [TW-1:0] table_q [1:(1<<K)-1];
  logic signed [B-1:0]  x_taps [K];
  logic signed [B-1:0]  x_oldest;
  int hist [K];

  da_table #(.B(B), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all();
    for (int k = 1; k < (1 << K); k++) begin
      int s = 0;
      for (int j = 0; j < K; j++) if (k[j]) s += hist[j];
      check(int'(table_q[k]) == s, $sformatf("entry %0d = %0d exp %0d", k, table_q[k], s));
    end
    for (int j = 0; j < K; j++) check(int'(x_taps[j]) == hist[j], "x_taps");
    check(int'(x_oldest) == hist[K-1], "x_oldest");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < K; j++) hist[j] = 0;
    x_new = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all();
    for (int n = 0; n < 400; n++) begin
      int v;
      if (n < 8)       v = (n % 2) ? -128 : 127;      // extremes first
      else             v = $signed(8'($urandom));
      x_new = B'(v);
      load  = (n % 3 != 2);                           // some cycles without load
      @(negedge clk);
      if (load) begin
        for (int j = K - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = v;
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
