// dlms_weight_update: the weight update half of the delayed-LMS adaptive filter.
//
// It receives the input sample and the error both delayed by the adaptation delay m, and on
// every clock with 'en' high applies
//   w_k(n+1) = w_k(n) + ( e(n-m) * x(n-m-k) ) >>> (FRAC + MU_SHIFT),   k = 0 .. N-1
// i.e. the LMS update with step size mu = 2**-MU_SHIFT realised as a shift. A tapped delay line
// of its own rebuilds the vector x(n-m-k) from the delayed sample stream. Weights are signed
// WW-bit registers with FRAC fractional bits, cleared by reset (the filter starts from zero
// weights) and wrapping on overflow. The product is truncated (floor). The power-of-two step
// size, the widths and the reset values are this design's choices.
module dlms_weight_update #(
  parameter int unsigned N        = ds_pkg::LMS_TAPS,
  parameter int unsigned XW       = ds_pkg::LMS_XW,
  parameter int unsigned WW       = ds_pkg::LMS_WW,
  parameter int unsigned FRAC     = ds_pkg::LMS_FRAC,
  parameter int unsigned MU_SHIFT = ds_pkg::LMS_MU_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x_d,    // x(n-m)
  input  logic signed [XW:0]   e_d,    // e(n-m), one bit wider than a sample
  output logic signed [WW-1:0] w [N]
);
  localparam int unsigned PW = 2 * XW + 1;   // width of e * x

  logic signed [XW-1:0] xv [N];
  logic signed [XW-1:0] hist_q [N];
  logic signed [WW-1:0] w_q [N];
  logic signed [PW-1:0] prod [N];
  logic signed [PW-1:0] step [N];

  always_comb begin
    xv[0] = x_d;
    for (int k = 1; k < int'(N); k++) xv[k] = hist_q[k-1];
    for (int k = 0; k < int'(N); k++) begin
      prod[k] = PW'(e_d * xv[k]);
      step[k] = prod[k] >>> (FRAC + MU_SHIFT);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hist_q <= '{default: '0};
      w_q    <= '{default: '0};
    end else if (en) begin
      hist_q[0] <= x_d;
      for (int k = 1; k < int'(N); k++) hist_q[k] <= hist_q[k-1];
      for (int k = 0; k < int'(N); k++) w_q[k] <= w_q[k] + step[k][WW-1:0];
    end

  assign w = w_q;
endmodule
