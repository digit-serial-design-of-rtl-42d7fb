// tb_ds_mcm_29_43: self-checking testbench for the digit-serial MCM block (29x, 43x, shared 7x).
//
// For each digit size in {1, 2, 4} an instance streams random 16-bit words back to back, least
// significant digit first, and the assembled outputs are compared with 7x, 29x and 43x modulo
// 2**16 computed here with ordinary multiplication. Corner words (all ones, the most negative
// value) make carries and shifted bits cross word boundaries. Output digits must appear in the
// same clock as the input digit of the same weight, so a word takes exactly 16/D clocks.
module tb_ds_mcm_29_43;
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
    wait (done == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_d
    localparam int D  = 1 << g;
    localparam int ND = WL / D;
    logic         first = 1'b0;
    logic [D-1:0] x = '0, y7, y29, y43;

    ds_mcm_29_43 #(.D(D)) dut (.clk, .rst_n, .first, .x, .y7, .y29, .y43);

    initial begin
      logic [WL-1:0] xv, g7, g29, g43;
      int t0;
      wait (rst_n);
      for (int w = 0; w < NWORDS; w++) begin
        case (w)
          0: xv = 16'hffff;
          1: xv = 16'h8000;
          2: xv = 16'h7fff;
          3: xv = 16'h0001;
          default: xv = WL'($urandom);
        endcase
        t0 = int'($time / 10);
        for (int t = 0; t < ND; t++) begin
          @(negedge clk);
          first = (t == 0);
          x = xv[t*D +: D];
          #1;
          g7[t*D +: D]  = y7;
          g29[t*D +: D] = y29;
          g43[t*D +: D] = y43;
        end
        checks += 4;
        if (g7 !== WL'(xv * 7))   begin failures++; $display("FAIL D=%0d 7x  x=%h got=%h", D, xv, g7); end
        if (g29 !== WL'(xv * 29)) begin failures++; $display("FAIL D=%0d 29x x=%h got=%h", D, xv, g29); end
        if (g43 !== WL'(xv * 43)) begin failures++; $display("FAIL D=%0d 43x x=%h got=%h", D, xv, g43); end
        // rate: one word per WL/D clocks
        if (int'($time / 10) - t0 != ND) begin
          failures++; $display("FAIL D=%0d word took %0d clocks", D, int'($time / 10) - t0);
        end
      end
      done++;
    end
  end
endmodule
