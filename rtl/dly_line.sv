// dly_line: an M-stage delay line (z^-M) for W-bit samples that advances when 'en' is high.
//
// With M = 0 the output is the input. Reset clears every stage. Used for the adaptation delay
// of the delayed-LMS filter on both the input sample and the error.
module dly_line #(
  parameter int unsigned W = 16,
  parameter int unsigned M = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  if (M == 0) begin : g_wire
    assign y = a;
  end else begin : g_reg
    logic [W-1:0] sr_q [M];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) sr_q <= '{default: '0};
      else if (en) begin
        sr_q[0] <= a;
        for (int i = 1; i < int'(M); i++) sr_q[i] <= sr_q[i-1];
      end
    assign y = sr_q[M-1];
  end
endmodule
