// tb_ds_fir: self-checking testbench for the digit-serial FIR filter y(n) = 29 x(n) + 43 x(n-1).
//
// Random signed 8-bit samples, sign-extended to 16-bit words, are streamed back to back at
// digit sizes 2 (the default) and 4. Each output word is compared, as a signed number, with the
// filter equation evaluated here in integer arithmetic; x(-1) is zero after reset. Full-scale
// samples (-128, 127) exercise the largest outputs. A word must take exactly 16/D clocks.
module tb_ds_fir;
  localparam int WL = 16;
  localparam int NWORDS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, done = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_d
    localparam int D  = 2 << g;
    localparam int ND = WL / D;
    logic         first = 1'b0;
    logic [D-1:0] x = '0, y;

    ds_fir #(.D(D), .WL(WL)) dut (.clk, .rst_n, .first, .x, .y);

    initial begin
      int xn, xp, exp, t0;
      logic [WL-1:0] xv, got;
      xp = 0;
      wait (rst_n);
      for (int w = 0; w < NWORDS; w++) begin
        case (w)
          0, 1:    xn = -128;
          2, 3:    xn = 127;
          4:       xn = -128;
          default: xn = int'($urandom_range(255)) - 128;
        endcase
        xv = WL'(xn);
        t0 = int'($time / 10);
        for (int t = 0; t < ND; t++) begin
          @(negedge clk);
          first = (t == 0);
          x = xv[t*D +: D];
          #1 got[t*D +: D] = y;
        end
        exp = 29 * xn + 43 * xp;
        checks++;
        if ($signed(got) != exp) begin
          failures++;
          $display("FAIL D=%0d n=%0d x=%0d x1=%0d got=%0d exp=%0d", D, w, xn, xp, $signed(got), exp);
        end
        if (int'($time / 10) - t0 != ND) begin
          failures++; $display("FAIL D=%0d word took %0d clocks", D, int'($time / 10) - t0);
        end
        xp = xn;
      end
      done++;
    end
  end
endmodule
