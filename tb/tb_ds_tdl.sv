// tb_ds_tdl: self-checking testbench for the digit-serial transposed delay-and-add chain.
//
// Three random product streams p0, p1, p2 (16-bit words, D = 2) are applied back to back and the
// output is compared with p0(n) + p1(n-1) + p2(n-2) modulo 2**16, with samples before reset
// taken as zero. This checks both the one-word digit delays and the digit-serial adders.
module tb_ds_tdl;
  localparam int D  = 2;
  localparam int WL = 16;
  localparam int ND = WL / D;
  localparam int NT = 3;

  logic         clk = 1'b0, rst_n = 1'b0, first = 1'b0;
  logic [D-1:0] p [NT];
  logic [D-1:0] y;
  int checks = 0, failures = 0;

  ds_tdl #(.D(D), .WL(WL), .NT(NT)) dut (.clk, .rst_n, .first, .p, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WL-1:0] hist [NT][3];   // hist[k][j] = p_k(n-j)
    logic [WL-1:0] got, exp;
    foreach (p[k]) p[k] = '0;
    foreach (hist[k, j]) hist[k][j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < NT; k++) begin
        hist[k][2] = hist[k][1];
        hist[k][1] = hist[k][0];
        hist[k][0] = (n < 3) ? 16'hffff : WL'($urandom);
      end
      for (int t = 0; t < ND; t++) begin
        @(negedge clk);
        first = (t == 0);
        for (int k = 0; k < NT; k++) p[k] = hist[k][0][t*D +: D];
        #1 got[t*D +: D] = y;
      end
      exp = hist[0][0] + hist[1][1] + hist[2][2];
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL n=%0d got=%h exp=%h", n, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
