// ds_sub: digit-serial subtractor, s = a - b, in two's complement.
//
// Same structure as ds_add (D full adders in a ripple, one carry flip-flop), with D inverters
// on the subtrahend and the carry flip-flop initialised to 1 at the start of every word, so
// a + ~b + 1 is formed digit by digit. 'first' marks the least significant digit of a word;
// in that cycle the stored carry is replaced by the initial value 1. Result digits leave in the
// same cycle as the operand digits; the difference wraps modulo 2**wordlength.
// Inverters plus a carry initialised to 1 are the standard digit-serial subtractor; the 'first'
// framing signal is this design's choice.
module ds_sub #(
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
  logic [D-1:0] nb;

  // D inverters, then a ripple of D full adders
  always_comb begin
    logic cy;
    nb = ~b;
    cy = first ? 1'b1 : carry_q;
    for (int i = 0; i < D; i++) begin
      s[i] = a[i] ^ nb[i] ^ cy;
      cy   = (a[i] & nb[i]) | (a[i] & cy) | (nb[i] & cy);
    end
    cy_out = cy;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) carry_q <= 1'b1;
    else        carry_q <= cy_out;
endmodule
