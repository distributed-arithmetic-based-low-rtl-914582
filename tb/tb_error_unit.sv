// Testbench for error_unit: exhaustive over the 8-bit desired value and a
// spread of 11-bit filter outputs; checks e = d - y, its sign and the
// magnitude saturated to 127.
module tb_error_unit;
  localparam int L = 8, YW = 11;
  int checks = 0, failures = 0;
  logic signed [L-1:0]  d;
  logic signed [YW-1:0] y;
  logic signed [YW:0]   e;
  logic                 sign;
  logic        [L-2:0]  mag;

  error_unit #(.L(L), .YW(YW)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = -128; dv < 128; dv++) begin
      for (int yv = -1024; yv < 1024; yv += ((yv > -300 && yv < 300) ? 1 : 37)) begin
        int ee, m;
        d = L'(dv); y = YW'(yv);
        #1;
        ee = dv - yv;
        m  = (ee < 0) ? -ee : ee;
        if (m > 127) m = 127;
        checks++;
        if (int'(e) != ee || sign != (ee < 0) || int'(mag) != m) begin
          failures++;
          $display("FAIL d=%0d y=%0d e=%0d sign=%0d mag=%0d", dv, yv, e, sign, mag);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
