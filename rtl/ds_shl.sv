// ds_shl: digit-serial left shift by S bit positions.
//
// A left shift of a least-significant-first digit stream is a delay of S bit positions. It is
// built from exactly S flip-flops arranged over the D bit layers: bit j of the output digit is
// either bit j-S of the current input digit (a wire) or a bit of an earlier digit held in a
// flip-flop. With D = 2, S = 1 the low output bit comes from a flip-flop holding the previous
// high input bit and the high output bit is a wire from the low input bit; with S = 2 each bit
// goes through one flip-flop. In the cycle marked 'first' (least significant digit of a word)
// the held bits are replaced by 0, so zeros enter at the bottom of each word and the top S bits
// of the word are dropped (the result wraps modulo 2**wordlength). Zero-cycle latency per digit.
// The flip-flop count and the per-bit layering follow the classic digit-serial shifter; the
// 'first' framing and the zero fill are this design's choices.
module ds_shl #(
  parameter int unsigned D = ds_pkg::DS_DIGIT,
  parameter int unsigned S = 1   // shift amount in bits, at least 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,
  input  logic [D-1:0] a,
  output logic [D-1:0] y
);
  // hist_q[k] holds input bit (t*D - S + k) of the stream at cycle t, oldest first
  logic [S-1:0]   hist_q;
  logic [S+D-1:0] v;     // {current digit, held bits}: v[j] is stream bit t*D - S + j

  always_comb begin
    v = {a, (first ? '0 : hist_q)};
    y = v[D-1:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) hist_q <= '0;
    else        hist_q <= v[S+D-1:D];
endmodule
