// encoder_pkg: widths and number formats shared by the spike encoders.
//
// All encoder arithmetic is 16 bits wide. Samples of the TTFS and ISI/multiplexing
// encoders are unsigned Q1.15 (16'h8000 = 1.0, the normalised maximum input); the
// rate encoder compares its sample with a full 16-bit random number, so its sample
// is unsigned with full scale 16'hFFFF. Time arguments of the exponential unit are
// unsigned Q6.10.
package encoder_pkg;
  localparam int unsigned DATA_W = 16;
  typedef logic [DATA_W-1:0] sample_t;

  // Q1.15 one: the TTFS threshold at t = 0 and the largest normalised sample.
  localparam sample_t Q15_ONE = 16'h8000;

  // Q6.10 time argument of the exponential approximation.
  localparam int unsigned EXP_INT_W  = 6;
  localparam int unsigned EXP_FRAC_W = 10;

  // Feedback taps shared by both LFSRs: x^16 + x^14 + x^13 + x^11 + 1.
  localparam logic [15:0] LFSR_TAPS = 16'hB400;
endpackage
