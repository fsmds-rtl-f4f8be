// histo_pkg: constants and types shared by the HISTO histogram/mean/range
// engine, its block RAM and the top level.
//
// The memory is one 8192-word x 16-bit block RAM split into three regions:
//   0    .. 2047  reserved for future use
//   2048 .. 4095  histogram, one 16-bit count per integer bin
//   4096 .. 8191  the 4096 data values ("PNs"), 16-bit signed fixed point
//                 with 12 integer bits and 4 fraction bits
// After a run the two top words of the histogram region hold the results:
//   4094  mean, same 12.4 fixed-point format as the data
//   4095  range in bins (integer), zero-extended to 16 bits
// The region boundaries, the 4096-value data set, the 12.4 format and the
// 6.25 % tail bound (4096 >> 4 = 256) follow the original design. The width
// of the stored range (12 bits) is this implementation's choice: it is the
// smallest width that holds the largest possible range, 2048.
package histo_pkg;

  // BRAM geometry
  localparam int unsigned PNL_BRAM_ADDR_SIZE_NB   = 13;   // 8192 words
  localparam int unsigned PNL_BRAM_DBITS_WIDTH_NB = 16;   // 16-bit words

  // Data set
  localparam int unsigned NUM_PNS_NB      = 12;           // log2(NUM_PNS)
  localparam int unsigned NUM_PNS         = 4096;
  localparam int unsigned PN_SIZE_NB      = 16;           // width of one value
  localparam int unsigned PN_PRECISION_NB = 4;            // fraction bits
  localparam int unsigned PN_INTEGER_NB   = 12;           // integer bits

  // Memory map
  localparam int unsigned HISTO_BRAM_BASE        = 2048;
  localparam int unsigned HISTO_BRAM_UPPER_LIMIT = 4096;  // first address past the histogram
  localparam int unsigned PN_BRAM_BASE           = 4096;
  localparam int unsigned PN_UPPER_LIMIT         = 8192;  // first address past the data

  // Tails: each tail holds NUM_PNS >> HISTO_BOUND_PCT_SHIFT_NB values (6.25 %)
  localparam int unsigned HISTO_BOUND_PCT_SHIFT_NB = 4;

  // Width of the range result written back to memory
  localparam int unsigned HISTO_MAX_RANGE_NB = 12;

  // Controller states, in the order the engine walks through them
  typedef enum logic [3:0] {
    ST_IDLE,
    ST_CLEAR_MEM,
    ST_FIND_SMALLEST,
    ST_COMPUTE_ADDR,
    ST_INC_CELL,
    ST_GET_NEXT_PN,
    ST_INIT_DIST,
    ST_SWEEP_BRAM,
    ST_CHECK_HISTO_ERROR,
    ST_WRITE_RANGE
  } histo_state_t;

endpackage
