// dsp_top: the three filter datapaths side by side.
//
//  * Digit-serial FIR filter (ds_fir): transposed form, y(n) = 29 x(n) + 43 x(n-1), whose
//    multiplier block is the shift-adds MCM network sharing 7x. D-bit digits, least significant
//    first, WL/D clocks per sample; 'fir_first' marks the least significant digit of each word.
//  * Bit-serial constant multiplier by 45 = 5 * 9 (ds_mul45, digit size 1); 'm45_first' marks
//    the least significant bit of each word.
//  * Delayed-LMS adaptive filter (dlms_filter), bit-parallel, one sample per clock with
//    'lms_en' high; it exposes its output, error and current weights.
// The three share only the clock and the active-low asynchronous reset. Each serial output
// digit leaves in the same clock as the input digit of the same weight.
module dsp_top #(
  parameter int unsigned FIR_D  = ds_pkg::DS_DIGIT,
  parameter int unsigned FIR_WL = ds_pkg::DS_WORD,
  parameter int unsigned M45_D  = 1,
  parameter int unsigned LMS_N  = ds_pkg::LMS_TAPS,
  parameter int unsigned LMS_M  = ds_pkg::LMS_DELAY,
  parameter int unsigned LMS_XW = ds_pkg::LMS_XW,
  parameter int unsigned LMS_WW = ds_pkg::LMS_WW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // digit-serial FIR filter
  input  logic                     fir_first,
  input  logic [FIR_D-1:0]         fir_x,
  output logic [FIR_D-1:0]         fir_y,
  // bit-serial multiplier by 45
  input  logic                     m45_first,
  input  logic [M45_D-1:0]         m45_x,
  output logic [M45_D-1:0]         m45_y,
  // delayed-LMS adaptive filter
  input  logic                     lms_en,
  input  logic signed [LMS_XW-1:0] lms_x,
  input  logic signed [LMS_XW-1:0] lms_d,
  output logic signed [LMS_XW-1:0] lms_y,
  output logic signed [LMS_XW:0]   lms_e,
  output logic signed [LMS_WW-1:0] lms_w [LMS_N]
);
  ds_fir #(.D(FIR_D), .WL(FIR_WL))
    u_fir (.clk, .rst_n, .first(fir_first), .x(fir_x), .y(fir_y));

  ds_mul45 #(.D(M45_D))
    u_m45 (.clk, .rst_n, .first(m45_first), .x(m45_x), .y5(), .y45(m45_y));

  dlms_filter #(.N(LMS_N), .M(LMS_M), .XW(LMS_XW), .WW(LMS_WW))
    u_lms (.clk, .rst_n, .en(lms_en), .x(lms_x), .d(lms_d), .y(lms_y), .e(lms_e), .w(lms_w));
endmodule
