// tb_ds_shl: self-checking testbench for ds_shl.
//
// Streams random WL-bit words through the block, one D-bit digit per clock, least significant
// digit first, back to back, with 'first' on the least significant digit of each word. Each
// output digit is read in the same clock as its input digits and the assembled word is
// compared with a << S modulo 2**WL (b is unused) computed on whole words here. Words are chosen so that carries and shifted
// bits cross word boundaries, which the per-word initialisation must stop.
module tb_ds_shl;
  localparam int D  = 2;
  localparam int WL = 16;
  localparam int ND = WL / D;

  logic         clk = 1'b0, rst_n = 1'b0, first = 1'b0;
  logic [D-1:0] a = '0, b = '0, s;
  int checks = 0, failures = 0;

  localparam int S = 3;  // shift amount under test; b is unused
  ds_shl #(.D(D), .S(S)) dut (.clk, .rst_n, .first, .a, .y(s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_word(input logic [WL-1:0] av, input logic [WL-1:0] bv,
                          output logic [WL-1:0] sv);
    for (int t = 0; t < ND; t++) begin
      @(negedge clk);
      first = (t == 0);
      a = av[t*D +: D];
      b = bv[t*D +: D];
      #1 sv[t*D +: D] = s;
    end
  endtask

  task automatic check(input logic [WL-1:0] av, input logic [WL-1:0] bv);
    logic [WL-1:0] got, exp;
    run_word(av, bv, got);
    exp = av << S;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h got=%h exp=%h", av, bv, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(16'hffff, 16'hffff);
    check(16'h0000, 16'h0000);
    check(16'h8000, 16'h8000);
    check(16'h0001, 16'h0000);
    check(16'hffff, 16'h0001);
    check(16'h0000, 16'h0001);
    for (int i = 0; i < 500; i++) check(WL'($urandom), WL'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
