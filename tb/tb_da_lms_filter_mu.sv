// End-to-end testbench of da_lms_filter with the smaller step size
// mu = 2^-1 / N (MU_I = 1): every weight increment is shifted one place
// further. Otherwise identical to the default-size testbench.
//
// The filter identifies an unknown FIR system: x is random, d is the
// unknown system's output (plus a little noise). A bit-true integer model of
// the delayed-LMS recurrence runs alongside:
//   y(n)   = sum over four-tap blocks of floor(sum_k w_k(n) x(n-k) / 2^(L-1))
//   e(n)   = d(n) - y(n)
//   w(n+1) = w(n) +/- floor(x(n-1-k) / 2^(t+PRE)),   t from the leading one of
//            min(|e(n-1)|, 127), no change for e = 0, sign from e(n-1)
//            with PRE = 1 + log2(N) + MU_I, i.e. mu = 2^-MU_I / N
// and at every sample strobe y_out, e_out and all weights are compared with
// it, with the latency of one sample period of L clock cycles checked by
// comparing at fixed strobes. A second phase drives d against the output to
// force error saturation. Mechanisms that must occur at least once: inverted
// MSB slices (a negative weight), add and subtract updates, zero-error
// (no-update) samples, error saturation, and the extreme shift words t = 0
// and t = 6. The error must also shrink as the filter converges.
module tb_da_lms_filter_mu;
  localparam int N = 4, L = 8, YW = L + 3 + $clog2(N / 4), MU_I = 1, PRE = 1 + $clog2(N) + MU_I;
  localparam int NS = 1500;                  // samples
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [L-1:0]  x_in, d_in;
  logic                 sample_en, y_valid;
  logic signed [YW-1:0] y_out;
  logic signed [YW:0]   e_out;
  logic signed [L-1:0]  w_out [N];

  da_lms_filter #(.MU_I(MU_I)) dut (.*);

  always #5 clk = ~clk;

  int xs [NS], ds [NS], ys [NS], es [NS];
  int wcur [N];
  // unknown system: the first N of these taps
  int h_all [16] = '{48, -30, 20, -9, 12, -6, 4, -3, 2, -1, 1, 0, 0, 0, 0, 0};
  int h [N];
  int n_neg_msb = 0, n_add = 0, n_sub = 0, n_zero = 0, n_sat = 0, n_t0 = 0, n_t6 = 0;
  int n_period = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int xat(int i);
    return (i < 0) ? 0 : xs[i];
  endfunction

  function automatic int wrap8(int v);
    return int'($signed(8'(v)));
  endfunction

  initial begin
    #((NS + 20) * L * 10 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, last_strobe, cyc;
    longint early_err, late_err;
    x_in = '0; d_in = '0;
    for (int k = 0; k < N; k++) begin wcur[k] = 0; h[k] = h_all[k]; end
    // stimulus
    for (int i = 0; i < NS; i++) begin
      int acc;
      xs[i] = $signed(8'($urandom)) % 100;
      acc = 0;
      for (int k = 0; k < N; k++) acc += h[k] * xat(i - k);
      acc = acc >>> (L - 1);
      if (i >= 1200 && i < 1300)       acc = (acc >= 0) ? -128 : 127;   // disturbance: saturating error
      else if (i % 9 == 0)             acc += int'($urandom % 3) - 1;    // small noise
      if (acc > 127) acc = 127;
      if (acc < -128) acc = -128;
      ds[i] = acc;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    s = 0; cyc = 0; last_strobe = -1;
    early_err = 0; late_err = 0;
    while (s < NS) begin
      @(negedge clk);
      cyc++;
      if (!sample_en) continue;
      if (last_strobe >= 0) check(cyc - last_strobe == L, "sample period is L cycles");
      last_strobe = cyc;
      // y(s-1) with the weights used during the period after strobe s-1
      if (s >= 1) begin
        int acc;
        ys[s-1] = 0;
        for (int j = 0; j < N / 4; j++) begin      // each four-tap block truncates on its own
          acc = 0;
          for (int k = 4 * j; k < 4 * j + 4; k++) acc += wcur[k] * xat(s - 1 - k);
          ys[s-1] += acc >>> (L - 1);
        end
        es[s-1] = ds[s-1] - ys[s-1];
      end
      for (int k = 0; k < N; k++)
        check(int'(w_out[k]) == wcur[k], $sformatf("s=%0d w[%0d]=%0d exp %0d", s, k, w_out[k], wcur[k]));
      if (s >= 2) begin
        check(y_valid, "y_valid");
        check(int'(y_out) == ys[s-2], $sformatf("s=%0d y=%0d exp %0d", s, y_out, ys[s-2]));
        check(int'(e_out) == es[s-2], $sformatf("s=%0d e=%0d exp %0d", s, e_out, es[s-2]));
        if (s - 2 < 100) early_err += (es[s-2] < 0) ? -es[s-2] : es[s-2];
        if (s - 2 >= 1100 && s - 2 < 1200) late_err += (es[s-2] < 0) ? -es[s-2] : es[s-2];
      end else begin
        check(!y_valid, "y_valid low before the first result");
      end
      for (int k = 0; k < N; k++) if (wcur[k] < 0) begin n_neg_msb++; break; end
      // weight update with e(s-2), x vector of sample s-2
      if (s >= 2) begin
        int e, mag, p, t;
        e = es[s-2];
        mag = (e < 0) ? -e : e;
        if (mag > 127) begin mag = 127; n_sat++; end
        p = -1;
        for (int i = 0; i < 7; i++) if ((mag >> i) & 1) p = i;
        if (p < 0) n_zero++;
        else begin
          t = 6 - p;
          if (t == 0) n_t0++;
          if (t == 6) n_t6++;
          if (e < 0) n_sub++; else n_add++;
          for (int k = 0; k < N; k++) begin
            int inc;
            inc = xat(s - 2 - k) >>> (t + PRE);
            wcur[k] = wrap8((e < 0) ? wcur[k] - inc : wcur[k] + inc);
          end
        end
      end
      x_in = L'(xs[s]);
      d_in = L'(ds[s]);
      s++;
    end
    $display("final weights %0d %0d %0d %0d (unknown system %0d %0d %0d %0d)",
             w_out[0], w_out[1], w_out[2], w_out[3], h[0], h[1], h[2], h[3]);
    $display("mean |e| first 100: %0d/100, samples 1100-1199: %0d/100", early_err, late_err);
    $display("events: negative-weight MSB slices %0d, add %0d, sub %0d, zero error %0d, saturated %0d, t=0 %0d, t=6 %0d",
             n_neg_msb, n_add, n_sub, n_zero, n_sat, n_t0, n_t6);
    check(late_err * 4 < early_err, "error shrinks as the filter converges");
    check(n_neg_msb > 0, "inverted MSB slice used");
    check(n_add > 0, "add update");
    check(n_sub > 0, "subtract update");
    check(n_zero > 0, "zero error, no update");
    check(n_sat > 0, "error saturation");
    check(n_t0 > 0, "shift word t = 0");
    check(n_t6 > 0, "shift word t = 6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
