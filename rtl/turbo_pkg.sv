// turbo_pkg: constants shared by the turbo encoder, the channel model and
// the turbo decoder.
//
// The code is a rate-1/3 parallel concatenated convolutional code on 8-bit
// blocks. Both constituent encoders are identical 4-state recursive
// systematic convolutional (RSC) encoders; the second one sees the block
// through a fixed 8-entry pseudo-random permutation.
//
// Conventions used throughout:
//   * A K-bit data word is sent most significant bit first: bit K-1 of the
//     word is trellis step 0 ("position 1" of the permutation table).
//   * Soft values are log-likelihood ratios L = ln(P(bit=0)/P(bit=1)),
//     two's complement with 2 fractional bits (1 LSB = 0.25). A positive
//     value means "0 is more likely".
//   * An RSC state holds M bits; bit 0 is the register written most recently.
//
// The block length, the permutation and the two-register RSC follow the
// design description; the tap polynomials were chosen to reproduce its
// printed encoder example (feedback 1+D^2, parity taken from the feedback
// register input). Soft-value widths and the iteration count are this
// design's own choices.
package turbo_pkg;

  // ---------------------------------------------------------------- block
  localparam int unsigned K      = 8;        // information bits per block
  localparam int unsigned NCODE  = 3 * K;    // code bits per block

  // Interleaver: output position j (1-based) takes input position PERM[j].
  typedef int unsigned perm_t [K];
  localparam perm_t PERM = '{4, 1, 2, 7, 8, 3, 5, 6};

  // ---------------------------------------------------------------- RSC
  localparam int unsigned M       = 2;        // memory elements
  localparam int unsigned NSTATE  = 1 << M;
  // FB_TAPS[i]: register i feeds back into the register input.
  localparam logic [M-1:0] FB_TAPS = 2'b10;   // a = u ^ s[1]  (1 + D^2)
  // FF_TAPS[0]: register input, FF_TAPS[i+1]: register i, to the parity.
  localparam logic [M:0]   FF_TAPS = 3'b001;  // p = a

  // ---------------------------------------------------------------- soft values
  localparam int unsigned LLR_W  = 6;   // channel LLR width (range -8 .. +7.75)
  localparam int unsigned EXT_W  = 8;   // a-priori / extrinsic / a-posteriori width
  localparam int unsigned MET_W  = 12;  // state-metric width
  localparam int unsigned AMP    = 8;   // channel LLR magnitude of a clean bit (2.0)
  localparam int unsigned N_ITER = 4;   // turbo iterations

endpackage
