// tb_ds_mul45: self-checking testbench for the bit-serial multiplier by 45 = 5 * 9.
//
// Random 16-bit words are streamed back to back, one bit per clock (digit size 1), least
// significant bit first. The first-stage output must be 5x and the final output 45x, both
// modulo 2**16, computed here by ordinary multiplication. A word takes exactly 16 clocks.
module tb_ds_mul45;
  localparam int D  = 1;
  localparam int WL = 16;
  localparam int ND = WL / D;

  logic         clk = 1'b0, rst_n = 1'b0, first = 1'b0;
  logic [D-1:0] x = '0, y5, y45;
  int checks = 0, failures = 0;

  ds_mul45 #(.D(D)) dut (.clk, .rst_n, .first, .x, .y5, .y45);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WL-1:0] xv, g5, g45;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 500; w++) begin
      xv = (w == 0) ? 16'hffff : (w == 1) ? 16'h8000 : WL'($urandom);
      for (int t = 0; t < ND; t++) begin
        @(negedge clk);
        first = (t == 0);
        x = xv[t*D +: D];
        #1;
        g5[t*D +: D]  = y5;
        g45[t*D +: D] = y45;
      end
      checks += 2;
      if (g5 !== WL'(xv * 5))   begin failures++; $display("FAIL 5x  x=%h got=%h", xv, g5); end
      if (g45 !== WL'(xv * 45)) begin failures++; $display("FAIL 45x x=%h got=%h", xv, g45); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
