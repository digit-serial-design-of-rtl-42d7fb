// ds_pkg: constants shared by the digit-serial blocks and the delayed-LMS filter.
//
// A digit-serial word of DS_WORD bits is carried as DS_WORD/DS_DIGIT digits, least significant
// digit first, one digit per clock. The digit size of 2 is the one used for the example MCM
// network; the word length of 16 bits and the DLMS sizes are this design's own choices.
package ds_pkg;
  localparam int unsigned DS_DIGIT = 2;   // digit size d
  localparam int unsigned DS_WORD  = 16;  // bits per digit-serial word (input data sign-extended)

  // Delayed-LMS adaptive filter defaults
  localparam int unsigned LMS_TAPS     = 8;   // filter length N
  localparam int unsigned LMS_DELAY    = 2;   // adaptation delay m
  localparam int unsigned LMS_XW       = 16;  // sample width (x, d, y)
  localparam int unsigned LMS_WW       = 16;  // weight width
  localparam int unsigned LMS_FRAC     = 15;  // fractional bits of the weights
  localparam int unsigned LMS_MU_SHIFT = 4;   // step size mu = 2**-LMS_MU_SHIFT
endpackage
