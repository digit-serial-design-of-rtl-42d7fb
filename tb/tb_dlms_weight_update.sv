// tb_dlms_weight_update: self-checking testbench for the DLMS weight update block.
//
// Random delayed samples x(n-m) and errors e(n-m) are applied with 'en' high on most clocks.
// After each clock every weight is compared with a model that applies
// w_k += floor(e * x(n-m-k) / 2**(15+4)) on enabled clocks only, in 64-bit integers truncated to
// 16 bits. Weights must be zero after reset; full-scale inputs exercise the largest steps.
module tb_dlms_weight_update;
  localparam int N = 8, XW = 16, WW = 16, FRAC = 15, MU_SHIFT = 4;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [XW-1:0] x_d = '0;
  logic signed [XW:0]   e_d = '0;
  logic signed [WW-1:0] w [N];
  int checks = 0, failures = 0;

  dlms_weight_update #(.N(N), .XW(XW), .WW(WW), .FRAC(FRAC), .MU_SHIFT(MU_SHIFT))
    dut (.clk, .rst_n, .en, .x_d, .e_d, .w);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs [N];
    logic signed [WW-1:0] wm [N];
    foreach (xs[k]) xs[k] = 0;
    foreach (wm[k]) wm[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // after the previous clock edge the weights must match the model
      for (int k = 0; k < N; k++) begin
        checks++;
        if (w[k] !== wm[k]) begin
          failures++;
          $display("FAIL n=%0d w[%0d]=%0d exp=%0d", n, k, w[k], wm[k]);
        end
      end
      en  = ($urandom_range(4) != 0);
      x_d = (n < 8) ? 16'sh8000 : XW'($urandom);
      e_d = (n < 8) ? 17'sh10000 : ((n % 3 == 0) ? (XW+1)'($urandom) : (XW+1)'($signed(XW'($urandom)) >>> 6));
      if (en) begin
        for (int k = N - 1; k > 0; k--) xs[k] = xs[k-1];
        xs[0] = longint'(x_d);
        for (int k = 0; k < N; k++)
          wm[k] = WW'(longint'(wm[k]) + ((longint'(e_d) * xs[k]) >>> (FRAC + MU_SHIFT)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
