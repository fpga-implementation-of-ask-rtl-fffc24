// sk_pkg: shared sample format of the shift-keying modulators.
//
// Every carrier and modulated sample is a signed two's-complement word of
// SAMPLE_W bits. Six bits follows the published gateway waveforms, whose
// values (110000, 111000, 110001) read as -1.0, -0.5 and -0.9375 for a
// unit-amplitude sine with SAMPLE_FRAC = 4 fraction bits. The modulators only
// select between samples, so the binary point is a convention of the sources
// and testbenches, not of the hardware; SAMPLE_FRAC is this design's reading.
package sk_pkg;

  parameter int unsigned SAMPLE_W    = 6;
  parameter int unsigned SAMPLE_FRAC = 4;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Message bit values and the carrier each one selects.
  typedef enum logic {
    SYM_ZERO = 1'b0,   // binary 0: A0 carrier (ASK) or f1 carrier (FSK)
    SYM_ONE  = 1'b1    // binary 1: A1 carrier (ASK) or f2 carrier (FSK)
  } symbol_e;

endpackage
