// tb_dlms_filter: self-checking testbench for the delayed-LMS adaptive filter.
//
// System identification: the desired signal d(n) is an unknown 4-tap FIR "plant" driven by the
// same random input x(n). Two kinds of checks:
//  * cycle-exact: y(n), e(n) and all weights are compared every sample with a model of the DLMS
//    equations written here (64-bit integers, same truncation), including the adaptation delay:
//    the weights must stay zero until the error of sample 0 has passed the m-stage delay;
//  * behavioural: after adaptation the error must be small and the weights close to the plant.
// Idle clocks with 'en' low must change nothing.
module tb_dlms_filter;
  localparam int N = 8, M = 2, XW = 16, WW = 16, FRAC = 15, MU_SHIFT = 4;
  localparam int NS = 4000;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [XW-1:0] x = '0, d = '0, y;
  logic signed [XW:0]   e;
  logic signed [WW-1:0] w [N];
  int checks = 0, failures = 0;

  dlms_filter #(.N(N), .M(M), .XW(XW), .WW(WW), .FRAC(FRAC), .MU_SHIFT(MU_SHIFT))
    dut (.clk, .rst_n, .en, .x, .d, .y, .e, .w);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NS * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // plant coefficients in Q1.15: 0.5, -0.25, 0.125, 0.0625
  localparam longint PLANT [N] = '{16384, -8192, 4096, 2048, 0, 0, 0, 0};

  initial begin
    longint xs [N+M];            // xs[j] = x(n-j) for the model
    longint es [M+1];            // es[j] = e(n-j)
    longint wm [N];
    longint acc, dp, ym, em, err_sum, d_sum;
    int first_change;
    foreach (xs[j]) xs[j] = 0;
    foreach (es[j]) es[j] = 0;
    foreach (wm[k]) wm[k] = 0;
    err_sum = 0; d_sum = 0; first_change = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NS; ) begin
      @(negedge clk);
      en = ($urandom_range(7) != 0);
      if (!en) begin
        // idle clock: random inputs, the weights must not move at the next edge
        x = XW'($urandom);
        d = XW'($urandom);
        continue;
      end
      for (int j = N + M - 1; j > 0; j--) xs[j] = xs[j-1];
      xs[0] = longint'(int'($urandom_range(32767)) - 16384);  // |x| <= 0.5
      dp = 0;
      for (int k = 0; k < N; k++) dp += PLANT[k] * xs[k];
      x = XW'(xs[0]);
      d = XW'(dp >>> FRAC);
      // model of the filter output and error
      acc = 0;
      for (int k = 0; k < N; k++) acc += wm[k] * xs[k];
      ym = longint'($signed(XW'(acc >>> FRAC)));
      em = longint'(d) - ym;
      for (int j = M; j > 0; j--) es[j] = es[j-1];
      es[0] = em;
      #1;
      checks += 2;
      if (y !== XW'(ym))     begin failures++; $display("FAIL n=%0d y=%0d exp=%0d", n, y, ym); end
      if (e !== (XW+1)'(em)) begin failures++; $display("FAIL n=%0d e=%0d exp=%0d", n, e, em); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (w[k] !== WW'(wm[k])) begin failures++; $display("FAIL n=%0d w[%0d]=%0d exp=%0d", n, k, w[k], wm[k]); end
      end
      if (first_change < 0 && (w[0] != 0 || w[1] != 0)) first_change = n;
      // model of the update applied at this clock edge: uses e(n-m) and x(n-m-k)
      for (int k = 0; k < N; k++)
        wm[k] = longint'($signed(WW'(wm[k] + ((es[M] * xs[M+k]) >>> (FRAC + MU_SHIFT)))));
      if (n >= NS - 500) begin
        err_sum += (em < 0) ? -em : em;
        d_sum   += (d < 0) ? -longint'(d) : longint'(d);
      end
      n++;
    end
    // the first weight change is seen M+1 samples after sample 0 (update uses e(n-M))
    checks++;
    if (first_change != M + 1) begin
      failures++; $display("FAIL first weight change at sample %0d, expected %0d", first_change, M + 1);
    end
    checks++;
    if (err_sum * 50 > d_sum) begin
      failures++; $display("FAIL no convergence: mean|e|=%0d mean|d|=%0d", err_sum / 500, d_sum / 500);
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (w[k] - PLANT[k] > 400 || PLANT[k] - w[k] > 400) begin
        failures++; $display("FAIL w[%0d]=%0d plant=%0d", k, w[k], PLANT[k]);
      end
    end
    $display("mean|e|=%0d mean|d|=%0d w0=%0d w1=%0d w2=%0d w3=%0d", err_sum / 500, d_sum / 500, w[0], w[1], w[2], w[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
