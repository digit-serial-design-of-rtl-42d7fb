// ds_mul45: digit-serial multiplication by the constant 45, factored as 45 = 5 * 9.
//
// Two cascaded shift-add stages:  5x = x + (x << 2),  45x = 5x + (5x << 3).
// The first stage shifts by two positions, the second by three; each stage is one digit-serial
// adder with its carry flip-flop. The default digit size is 1 (bit-serial): x enters one bit per
// clock, least significant bit first, and the bit of 45x of the same weight leaves in the same
// clock. 'first' marks the least significant digit of each word and clears the carry and shift
// flip-flops. The caller sign-extends x by at least 6 bits; the product wraps modulo
// 2**wordlength.
module ds_mul45 #(
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,
  input  logic [D-1:0] x,
  output logic [D-1:0] y5,   // 5x, the first stage
  output logic [D-1:0] y45
);
  logic [D-1:0] x_sh2, y5_sh3;

  ds_shl #(.D(D), .S(2)) u_sh2 (.clk, .rst_n, .first, .a(x),  .y(x_sh2));
  ds_add #(.D(D))        u_a5  (.clk, .rst_n, .first, .a(x),  .b(x_sh2),  .s(y5));
  ds_shl #(.D(D), .S(3)) u_sh3 (.clk, .rst_n, .first, .a(y5), .y(y5_sh3));
  ds_add #(.D(D))        u_a45 (.clk, .rst_n, .first, .a(y5), .b(y5_sh3), .s(y45));
endmodule
