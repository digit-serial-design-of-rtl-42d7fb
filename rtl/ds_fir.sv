// ds_fir: digit-serial transposed-form FIR filter whose multiplier block is a shift-adds MCM.
//
// y(n) = H0 * x(n) + H1 * x(n-1) with H0 = 29 and H1 = 43, the two constants of the example MCM
// network. The digit-serial MCM block (ds_mcm_29_43) produces the product streams 29x and 43x,
// and the transposed delay-and-add chain (ds_tdl) combines them. One D-bit digit of x enters
// per clock, least significant digit first; a sample is a word of WL bits, i.e. WL/D clocks.
// 'first' must be high on the least significant digit of each word, every WL/D clocks, with no
// gaps between words. The digit of y of the same weight leaves in the same clock. x must be
// sign-extended so that 72*|x| fits in WL bits (8-bit samples for WL = 16); y wraps otherwise.
module ds_fir #(
  parameter int unsigned D  = ds_pkg::DS_DIGIT,
  parameter int unsigned WL = ds_pkg::DS_WORD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,
  input  logic [D-1:0] x,
  output logic [D-1:0] y
);
  logic [D-1:0] y29, y43;
  logic [D-1:0] p [2];

  ds_mcm_29_43 #(.D(D)) u_mcm (.clk, .rst_n, .first, .x, .y7(), .y29, .y43);

  assign p[0] = y29;   // h0
  assign p[1] = y43;   // h1

  ds_tdl #(.D(D), .WL(WL), .NT(2)) u_tdl (.clk, .rst_n, .first, .p, .y);
endmodule
