// am_pkg: sizes, widths and shared types of the associative-memory online
// learning engine.
//
// The engine stores up to N_BLOCKS*ROWS reference feature vectors of DIMS
// 16-bit elements, finds the stored vector nearest to a query (sum of squared
// differences, or optionally sum of absolute differences) and learns online:
// a near match is promoted in a short/long-term rank list, a far query is
// stored as a new reference, forgetting the lowest-ranked one when needed.
//
// The numbers below follow the published architecture: 16-bit features,
// 32-bit squares, 40-bit accumulators, 32 rows per block, 32 blocks (1024
// rows), 64 dimensions and 4 clock cycles per dimension. The split of the
// rank list into long- and short-term parts and the default jump value are
// this design's own choices.
package am_pkg;

  localparam int unsigned FEAT_W      = 16;  // feature element width
  localparam int unsigned SQ_W        = 32;  // square of a 16-bit difference
  localparam int unsigned ACC_W       = 40;  // per-row distance accumulator
  localparam int unsigned DIMS        = 64;  // feature vector length (8x8 grid)
  localparam int unsigned ROWS        = 32;  // reference rows per block
  localparam int unsigned N_BLOCKS    = 32;  // blocks in the parallel memory
  localparam int unsigned CYC_PER_DIM = 4;   // clock cycles spent per dimension

  // Distance measure used by the row datapaths.
  typedef enum logic {
    METRIC_EUCLID    = 1'b0,  // sum of squared differences, eq. (3)
    METRIC_MANHATTAN = 1'b1   // sum of absolute differences, eq. (1)
  } metric_e;

  // Where a newly learned reference enters the rank list.
  typedef enum logic {
    INS_SHORT_TERM = 1'b0,  // always at the top of the short-term part
    INS_LONG_FIRST = 1'b1   // at the top of long-term until it is full
  } ins_mode_e;

endpackage
