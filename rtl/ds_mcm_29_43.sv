// ds_mcm_29_43: digit-serial multiple constant multiplication of x by 29 and by 43.
//
// The shift-adds network is the graph-based solution that shares the partial product 7x:
//   7x  = (x << 3) - x
//   29x = (7x << 2) + x
//   43x = (7x << 1) + 29x
// i.e. two digit-serial additions, one digit-serial subtraction and left shifts. The shifts of
// 7x by 1 and by 2 share one flip-flop chain (7x<<2 is 7x<<1 shifted once more), so the shifts
// cost 3 + 1 + 1 = 5 flip-flops. One D-bit digit of x enters per clock, least significant digit
// first, and the matching digits of 29x and 43x leave in the same clock. 'first' marks the least
// significant digit of each word and initialises every carry and shift flip-flop. The caller
// must sign-extend x to a word long enough for 43x (6 bits more than x); results wrap modulo
// 2**wordlength. Sharing 7x, and the operator counts (two additions, one subtraction, five shift
// flip-flops) are those of the classic example; the individual shift amounts are this design's
// reading of them, and bringing 7x out as a port is this design's addition.
module ds_mcm_29_43 #(
  parameter int unsigned D = ds_pkg::DS_DIGIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,
  input  logic [D-1:0] x,
  output logic [D-1:0] y7,    // 7x, the shared partial product
  output logic [D-1:0] y29,
  output logic [D-1:0] y43
);
  logic [D-1:0] x_sh3, y7_sh1, y7_sh2;

  ds_shl #(.D(D), .S(3)) u_x_sh3  (.clk, .rst_n, .first, .a(x),      .y(x_sh3));
  ds_sub #(.D(D))        u_sub7   (.clk, .rst_n, .first, .a(x_sh3),  .b(x),      .s(y7));
  ds_shl #(.D(D), .S(1)) u_7_sh1  (.clk, .rst_n, .first, .a(y7),     .y(y7_sh1));
  ds_shl #(.D(D), .S(1)) u_7_sh2  (.clk, .rst_n, .first, .a(y7_sh1), .y(y7_sh2));
  ds_add #(.D(D))        u_add29  (.clk, .rst_n, .first, .a(y7_sh2), .b(x),      .s(y29));
  ds_add #(.D(D))        u_add43  (.clk, .rst_n, .first, .a(y7_sh1), .b(y29),    .s(y43));
endmodule
