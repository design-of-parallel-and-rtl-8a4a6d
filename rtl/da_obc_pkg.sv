// da_obc_pkg: constants and types shared by the 2-BAAT distributed-arithmetic
// OBC FIR filter.
//
// The filter has four taps, so an offset-binary-coded look-up table needs
// 2^(4-1) = 8 words: the newest sample's bit x0n folds the other three address
// bits and selects the sign of the word read. Each of the two bit-serial lanes
// receives a lane_ctl_t every clock: `first` is the Extra switch (S3 for the
// least-significant lane, S4 for the most-significant lane), `nsign` is the
// sign-slice switch (S1 / S2), which is 0 on the slice that carries the
// samples' sign bits and 1 on every other slice.
package da_obc_pkg;

  // Number of filter taps (the look-up table is built for exactly four).
  localparam int unsigned TAPS = 4;
  // Words in one OBC look-up table: 2^(TAPS-1).
  localparam int unsigned ROM_WORDS = 2 ** (TAPS - 1);
  // Address width of one OBC look-up table.
  localparam int unsigned ROM_AW = TAPS - 1;

  // Per-clock control of one lane.
  typedef struct packed {
    logic first;  // S3/S4: 1 = start from the Extra term, 0 = add the shifted accumulator
    logic nsign;  // S1/S2: 0 = this slice holds the sign bits (n = 0), 1 = otherwise
  } lane_ctl_t;

endpackage
