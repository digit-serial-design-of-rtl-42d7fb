// dlms_fir_block: the filtering half of the delayed-LMS adaptive filter.
//
// A direct-form FIR filter of N taps whose weights come from outside (the weight update block):
//   y(n) = ( sum_{k=0}^{N-1} w_k(n) * x(n-k) ) >>> FRAC
// x and y are signed XW-bit samples, the weights signed WW-bit numbers with FRAC fractional bits.
// A tapped delay line holds x(n-1) .. x(n-N+1) and advances on each clock with 'en' high; the
// inner product of the current sample and the history is combinational, so y(n) is valid in the
// same clock as x(n). The sum is kept at full precision and truncated (floor) by FRAC bits; the
// result wraps to XW bits. The tap count, widths and the combinational inner product are this
// design's choices.
module dlms_fir_block #(
  parameter int unsigned N    = ds_pkg::LMS_TAPS,
  parameter int unsigned XW   = ds_pkg::LMS_XW,
  parameter int unsigned WW   = ds_pkg::LMS_WW,
  parameter int unsigned FRAC = ds_pkg::LMS_FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,       // a new sample x(n) is present
  input  logic signed [XW-1:0] x,
  input  logic signed [WW-1:0] w [N],
  output logic signed [XW-1:0] y
);
  localparam int unsigned AW = XW + WW + $clog2(N + 1);

  logic signed [XW-1:0] xv [N];      // xv[k] = x(n-k)
  logic signed [XW-1:0] hist_q [N];  // hist_q[k] = x(n-1-k); the last entry is unused

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) hist_q <= '{default: '0};
    else if (en) begin
      hist_q[0] <= x;
      for (int k = 1; k < int'(N); k++) hist_q[k] <= hist_q[k-1];
    end

  logic signed [AW-1:0] acc;
  always_comb begin
    xv[0] = x;
    for (int k = 1; k < int'(N); k++) xv[k] = hist_q[k-1];
    acc = '0;
    for (int k = 0; k < int'(N); k++) acc += AW'(w[k] * xv[k]);
  end

  assign y = XW'(acc >>> FRAC);
endmodule
