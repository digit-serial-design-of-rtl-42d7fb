// tb_dsp_top: end-to-end testbench of dsp_top at its default parameters.
//
// Three processes run at once on the shared clock:
//  * FIR: random signed 8-bit samples, sign-extended to 16-bit words, streamed two bits per
//    clock; every output word is compared with 29 x(n) + 43 x(n-1).
//  * x45: random 16-bit words streamed one bit per clock; every output is compared with 45x.
//  * DLMS: identifies a 4-tap plant from random input; output and error are checked against a
//    model of the DLMS equations every sample, and the error must shrink by the end.
// Each mechanism of the design is counted and must occur at least once: back-to-back words
// in both serial paths (carry and shift flip-flops re-initialised per word), a non-zero delayed
// sample entering the FIR sum, negative FIR outputs, idle DLMS clocks, weight updates and the
// adaptation delay, and convergence. Word timing is checked too: a FIR word takes 8 clocks, an
// x45 word 16.
module tb_dsp_top;
  localparam int FD = ds_pkg::DS_DIGIT, WL = ds_pkg::DS_WORD, FND = WL / FD;
  localparam int N = ds_pkg::LMS_TAPS, M = ds_pkg::LMS_DELAY, XW = ds_pkg::LMS_XW;
  localparam int WW = ds_pkg::LMS_WW, FRAC = ds_pkg::LMS_FRAC, MU = ds_pkg::LMS_MU_SHIFT;
  localparam int NFIR = 300, NM45 = 150, NLMS = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fir_first = 1'b0, m45_first = 1'b0, lms_en = 1'b0;
  logic [FD-1:0] fir_x = '0, fir_y;
  logic [0:0]    m45_x = '0, m45_y;
  logic signed [XW-1:0] lms_x = '0, lms_d = '0, lms_y;
  logic signed [XW:0]   lms_e;
  logic signed [WW-1:0] lms_w [N];

  dsp_top dut (.*);

  int checks = 0, failures = 0, done = 0;
  int n_fir_words = 0, n_fir_neg = 0, n_fir_delayed = 0, n_m45_words = 0;
  int n_lms_idle = 0, n_lms_updates = 0, n_lms_delay_ok = 0, n_lms_converged = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NLMS * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seen(input string what, input int count);
    checks++;
    $display("mechanism %-32s seen %0d times", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 3);
    expect_seen("FIR back-to-back words", n_fir_words);
    expect_seen("FIR delayed sample in sum", n_fir_delayed);
    expect_seen("FIR negative output", n_fir_neg);
    expect_seen("x45 back-to-back words", n_m45_words);
    expect_seen("DLMS idle clock", n_lms_idle);
    expect_seen("DLMS weight update", n_lms_updates);
    expect_seen("DLMS adaptation delay", n_lms_delay_ok);
    expect_seen("DLMS convergence", n_lms_converged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- digit-serial FIR ----------------
  initial begin
    int xn, xp, exp, t0;
    logic [WL-1:0] xv, got;
    xp = 0;
    wait (rst_n);
    for (int w = 0; w < NFIR; w++) begin
      xn = (w < 2) ? -128 : int'($urandom_range(255)) - 128;
      xv = WL'(xn);
      t0 = int'($time / 10);
      for (int t = 0; t < FND; t++) begin
        @(negedge clk);
        fir_first = (t == 0);
        fir_x = xv[t*FD +: FD];
        #1 got[t*FD +: FD] = fir_y;
      end
      exp = 29 * xn + 43 * xp;
      checks += 2;
      if ($signed(got) != exp) begin
        failures++; $display("FAIL FIR n=%0d got=%0d exp=%0d", w, $signed(got), exp);
      end
      if (int'($time / 10) - t0 != FND) begin failures++; $display("FAIL FIR word timing"); end
      n_fir_words++;
      if (xp != 0) n_fir_delayed++;
      if (exp < 0) n_fir_neg++;
      xp = xn;
    end
    done++;
  end

  // ---------------- bit-serial x45 ----------------
  initial begin
    logic [WL-1:0] xv, got;
    int t0;
    wait (rst_n);
    for (int w = 0; w < NM45; w++) begin
      xv = (w == 0) ? 16'hffff : WL'($urandom);
      t0 = int'($time / 10);
      for (int t = 0; t < WL; t++) begin
        @(negedge clk);
        m45_first = (t == 0);
        m45_x = xv[t];
        #1 got[t] = m45_y;
      end
      checks += 2;
      if (got !== WL'(xv * 45)) begin failures++; $display("FAIL x45 x=%h got=%h", xv, got); end
      if (int'($time / 10) - t0 != WL) begin failures++; $display("FAIL x45 word timing"); end
      n_m45_words++;
    end
    done++;
  end

  // ---------------- delayed LMS ----------------
  localparam longint PLANT [N] = '{16384, -8192, 4096, 2048, 0, 0, 0, 0};
  initial begin
    longint xs [N+M];
    longint es [M+1];
    longint wm [N];
    longint acc, dp, ym, em, err_early, err_late;
    int first_change;
    foreach (xs[j]) xs[j] = 0;
    foreach (es[j]) es[j] = 0;
    foreach (wm[k]) wm[k] = 0;
    err_early = 0; err_late = 0; first_change = -1;
    wait (rst_n);
    for (int n = 0; n < NLMS; ) begin
      logic changed;
      @(negedge clk);
      lms_en = ($urandom_range(7) != 0);
      if (!lms_en) begin
        lms_x = XW'($urandom);
        lms_d = XW'($urandom);
        n_lms_idle++;
        continue;
      end
      for (int j = N + M - 1; j > 0; j--) xs[j] = xs[j-1];
      xs[0] = longint'(int'($urandom_range(32767)) - 16384);
      dp = 0;
      for (int k = 0; k < N; k++) dp += PLANT[k] * xs[k];
      lms_x = XW'(xs[0]);
      lms_d = XW'(dp >>> FRAC);
      acc = 0;
      for (int k = 0; k < N; k++) acc += wm[k] * xs[k];
      ym = longint'($signed(XW'(acc >>> FRAC)));
      em = longint'(lms_d) - ym;
      for (int j = M; j > 0; j--) es[j] = es[j-1];
      es[0] = em;
      #1;
      checks += 2;
      if (lms_y !== XW'(ym))     begin failures++; $display("FAIL DLMS n=%0d y=%0d exp=%0d", n, lms_y, ym); end
      if (lms_e !== (XW+1)'(em)) begin failures++; $display("FAIL DLMS n=%0d e=%0d exp=%0d", n, lms_e, em); end
      changed = 1'b0;
      for (int k = 0; k < N; k++) begin
        logic signed [WW-1:0] nw;
        nw = WW'(wm[k] + ((es[M] * xs[M+k]) >>> (FRAC + MU)));
        if (longint'(nw) != wm[k]) changed = 1'b1;
        wm[k] = longint'(nw);
      end
      if (changed) n_lms_updates++;
      if (first_change < 0 && lms_w[0] != 0) first_change = n;
      if (n < 200)         err_early += (em < 0) ? -em : em;
      if (n >= NLMS - 200) err_late  += (em < 0) ? -em : em;
      n++;
    end
    if (first_change == M + 1) n_lms_delay_ok++;
    else $display("first weight change at sample %0d", first_change);
    if (err_late * 10 < err_early) n_lms_converged++;
    $display("DLMS mean|e| first 200 = %0d, last 200 = %0d", err_early / 200, err_late / 200);
    done++;
  end
endmodule
