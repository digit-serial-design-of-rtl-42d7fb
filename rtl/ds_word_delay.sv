// ds_word_delay: one-sample delay (z^-1) for a digit-serial stream.
//
// A sample of WL bits occupies WL/D consecutive clocks, so delaying it by one sample period is
// a shift register of WL/D digit registers: the digit that leaves in a clock is the digit of the
// same weight of the previous word. Reset clears the register, so the first output word is 0.
// Words must follow each other without gaps. The digit-level form of the delay is this design's
// choice; the filter structure only calls for a one-sample delay.
module ds_word_delay #(
  parameter int unsigned D  = ds_pkg::DS_DIGIT,
  parameter int unsigned WL = ds_pkg::DS_WORD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [D-1:0] a,
  output logic [D-1:0] y
);
  localparam int unsigned ND = WL / D;
  logic [D-1:0] sr_q [ND];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sr_q <= '{default: '0};
    else begin
      sr_q[0] <= a;
      for (int i = 1; i < ND; i++) sr_q[i] <= sr_q[i-1];
    end

  assign y = sr_q[ND-1];
endmodule
