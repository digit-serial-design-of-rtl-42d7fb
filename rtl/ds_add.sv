// ds_add: digit-serial adder, s = a + b.
//
// Each clock one D-bit digit of each operand enters, least significant digit first, and the
// matching digit of the sum leaves in the same cycle. Inside is a ripple of D full adders; the
// carry out of the top adder is held in one flip-flop and fed back as the carry in of the next
// digit, as in the classic digit-serial adder. The carry flip-flop is (re)initialised to 0 at
// the start of every word: 'first' marks the cycle that carries the least significant digit, and
// in that cycle the stored carry is replaced by 0. Wordlength is set by the caller's framing
// ('first' period); the sum wraps modulo 2**wordlength. The framing signal is this design's
// choice: the textbook figure leaves the flip-flop initialisation out.
module ds_add #(
  parameter int unsigned D = ds_pkg::DS_DIGIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,   // current digit is the least significant digit of a word
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  output logic [D-1:0] s
);
  logic         carry_q;
  logic         cy_out;

  // ripple of D full adders
  always_comb begin
    logic cy;
    cy = first ? 1'b0 : carry_q;
    for (int i = 0; i < D; i++) begin
      s[i] = a[i] ^ b[i] ^ cy;
      cy   = (a[i] & b[i]) | (a[i] & cy) | (b[i] & cy);
    end
    cy_out = cy;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) carry_q <= 1'b0;
    else        carry_q <= cy_out;
endmodule
