// Shared constants of the five-input-majority-gate adder and the filters
// built on it. The adder width (128 bits) and the four FIR taps are the
// design's stated sizes; the coefficient values and the IIR structure are
// this implementation's choices (see the filter modules).
package qca_pkg;

  // Width of the ripple adder and of every filter datapath word.
  localparam int unsigned ADDER_W  = 128;

  // FIR filter taps.
  localparam int unsigned FIR_TAPS = 4;

  // IIR filter: feed-forward taps b0, b1 and feedback taps a1, a2.
  localparam int unsigned IIR_FF   = 2;
  localparam int unsigned IIR_FB   = 2;

  // Default coefficients. Signed integers; the filters work in ADDER_W-bit
  // two's-complement (modular) arithmetic.
  localparam int FIR_COEF_DEFAULT [FIR_TAPS] = '{1, 3, 3, 1};
  localparam int IIR_B_DEFAULT    [IIR_FF]   = '{2, 1};
  localparam int IIR_A_DEFAULT    [IIR_FB]   = '{1, -1};

endpackage
