// tb_dlms_fir_block: self-checking testbench for the FIR filter block of the DLMS filter.
//
// Random Q1.15 weights and random signed 16-bit samples are applied, one sample per enabled
// clock, with idle clocks ('en' low) mixed in that must not advance the delay line. Each output
// is compared with floor(sum_k w_k x(n-k) / 2**15) truncated to 16 bits, computed here with
// 64-bit integers from a model of the delay line; samples before reset are zero.
module tb_dlms_fir_block;
  localparam int N = 8, XW = 16, WW = 16, FRAC = 15;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [XW-1:0] x = '0, y;
  logic signed [WW-1:0] w [N];
  int checks = 0, failures = 0;

  dlms_fir_block #(.N(N), .XW(XW), .WW(WW), .FRAC(FRAC)) dut (.clk, .rst_n, .en, .x, .w, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs [N];     // xs[k] = x(n-k)
    longint acc;
    logic signed [XW-1:0] exp;
    foreach (w[k]) w[k] = '0;
    foreach (xs[k]) xs[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n % 50 == 0) foreach (w[k]) w[k] = WW'($urandom);
      en = ($urandom_range(3) != 0);
      x  = (n < 4) ? 16'sh8000 : XW'($urandom);
      #1;
      acc = 0;
      for (int k = 0; k < N; k++) acc += longint'(w[k]) * ((k == 0) ? longint'(x) : xs[k]);
      exp = XW'(acc >>> FRAC);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL n=%0d y=%0d exp=%0d", n, y, exp);
      end
      if (en) begin
        for (int k = N - 1; k > 1; k--) xs[k] = xs[k-1];
        xs[1] = longint'(x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
