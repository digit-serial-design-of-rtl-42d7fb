// ds_tdl: the delay-and-add chain of a transposed-form FIR filter, in digit-serial arithmetic.
//
// Input p[k] is the digit stream of the product h_k * x(n). The chain forms
//   acc[NT-1] = p[NT-1],   acc[k] = p[k] + z^-1 acc[k+1],   y = acc[0]
// so y(n) = sum_k h_k x(n-k). Each z^-1 is a one-word digit shift register (ds_word_delay) and
// each adder is a digit-serial adder (ds_add) sharing the word framing 'first'. Output digits
// leave in the same clock as the product digits; the sum wraps modulo 2**WL.
// The transposed structure is the standard one; the digit-serial delays and the tap count
// parameter are this design's choices.
module ds_tdl #(
  parameter int unsigned D  = ds_pkg::DS_DIGIT,
  parameter int unsigned WL = ds_pkg::DS_WORD,
  parameter int unsigned NT = 2                  // number of taps, at least 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,
  input  logic [D-1:0] p [NT],
  output logic [D-1:0] y
);
  logic [D-1:0] acc [NT];
  logic [D-1:0] dly [NT];   // dly[k] = z^-1 acc[k], k >= 1

  assign acc[NT-1] = p[NT-1];
  assign dly[0]    = '0;    // unused

  for (genvar k = NT - 2; k >= 0; k--) begin : g_tap
    ds_word_delay #(.D(D), .WL(WL)) u_z (.clk, .rst_n, .a(acc[k+1]), .y(dly[k+1]));
    ds_add        #(.D(D))          u_a (.clk, .rst_n, .first, .a(p[k]), .b(dly[k+1]), .s(acc[k]));
  end

  assign y = acc[0];
endmodule
