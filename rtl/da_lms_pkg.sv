// Shared constants of the distributed-arithmetic (DA) LMS adaptive filter.
// The default word length (8 bits) and filter length (16 taps) are the
// configuration the filter is built and evaluated at. T_ZERO is the control
// word meaning "error magnitude is zero, no weight increment"; that code is
// this design's own choice.
package da_lms_pkg;
  localparam int unsigned L_DEF  = 8;   // word length of samples and weights
  localparam int unsigned N_DEF  = 16;  // filter length
  localparam int unsigned TW     = 3;   // width of the barrel-shifter control word
  localparam logic [TW-1:0] T_ZERO = 3'd7;
endpackage
