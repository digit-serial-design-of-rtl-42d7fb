// dlms_filter: conventional delayed-LMS (DLMS) adaptive filter.
//
// The FIR filter block computes y(n) from the input x(n) and the current weights; the error
// e(n) = d(n) - y(n) against the desired signal d(n) goes through an m-stage delay, as does the
// input sample, and the weight update block adapts the weights with the delayed pair:
//   w(n+1) = w(n) + mu * e(n-m) * x(n-m)
// The adaptation delay m is what lets the update and the filtering be pipelined apart. One
// sample is taken per clock with 'en' high; y and e are combinational from x and d. The error is
// one bit wider than the samples so d - y cannot overflow. Sizes come from ds_pkg and are this
// design's choices: 8 taps, m = 2, 16-bit samples and Q1.15 weights, mu = 1/16.
module dlms_filter #(
  parameter int unsigned N        = ds_pkg::LMS_TAPS,
  parameter int unsigned M        = ds_pkg::LMS_DELAY,
  parameter int unsigned XW       = ds_pkg::LMS_XW,
  parameter int unsigned WW       = ds_pkg::LMS_WW,
  parameter int unsigned FRAC     = ds_pkg::LMS_FRAC,
  parameter int unsigned MU_SHIFT = ds_pkg::LMS_MU_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,     // input sample x(n)
  input  logic signed [XW-1:0] d,     // desired signal d(n)
  output logic signed [XW-1:0] y,     // filter output y(n)
  output logic signed [XW:0]   e,     // error e(n) = d(n) - y(n)
  output logic signed [WW-1:0] w [N]  // current weights
);
  logic signed [XW-1:0] x_d;
  logic signed [XW:0]   e_d;

  dlms_fir_block #(.N(N), .XW(XW), .WW(WW), .FRAC(FRAC))
    u_fir (.clk, .rst_n, .en, .x, .w, .y);

  assign e = (XW+1)'(d) - (XW+1)'(y);

  dly_line #(.W(XW),   .M(M)) u_xdly (.clk, .rst_n, .en, .a(x), .y(x_d));
  dly_line #(.W(XW+1), .M(M)) u_edly (.clk, .rst_n, .en, .a(e), .y(e_d));

  dlms_weight_update #(.N(N), .XW(XW), .WW(WW), .FRAC(FRAC), .MU_SHIFT(MU_SHIFT))
    u_wu (.clk, .rst_n, .en, .x_d, .e_d, .w);
endmodule
