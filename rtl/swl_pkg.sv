// swl_pkg: constants and types shared by the statistical wear-leveling (SWL) logic.
//
// SWL estimates the overwrite rate of a PCM region by sampling a small fraction of its
// writes, and triggers random block swaps in proportion to that estimate rather than to
// the raw write count. The numbers below are the main configuration: a cut-off distance
// of 4000 writes, an allowed error of 200, 900 samples per population of 2^20 writes, a
// 13-entry sample buffer shared by the four 512-Mb banks (2 Gb) of one region, a swap
// batch released every 6 completed samples, 512-bit blocks per chip and 2^20 frames per
// bank. The address width of a buffer entry is 43 bits. Key widths equal the frame index
// width (20 bits). The LFSR polynomial and the swap-engine encoding are this design's own.
package swl_pkg;

  // Sampling (statistics)
  localparam int unsigned CUTOFF      = 4000;  // distances at or above this complete the sample
  localparam int unsigned EPSILON     = 200;   // allowed error, subtracted from every distance
  localparam int unsigned NUM_SAMPLES = 900;   // samples wanted per population
  localparam int unsigned POP_W       = 20;    // numPopulation = 2^POP_W writes
  localparam int unsigned BUF_DEPTH   = 13;    // sample buffer entries
  localparam int unsigned TAG_W       = 43;    // block address held in a buffer entry

  // Swapping
  localparam int unsigned SWAP_THR    = 6;     // completed samples per swap batch
  localparam int unsigned FRAME_W     = 20;    // 2^20 frames of 512 bits per 512-Mb bank
  localparam int unsigned ROW_BLK_W   = 6;     // 64 blocks of 512 bits per 32-Kb row
  localparam int unsigned DATA_W      = 512;   // bits of a block held by one chip

  // Organisation of one chip
  localparam int unsigned BANKS_PER_REGION = 4; // banks sharing one sample buffer
  localparam int unsigned REGIONS          = 4; // sample buffers per 8-Gb chip

  // Width of the swap batch size register
  localparam int unsigned BATCH_W     = 32;

  // Adjusted distance of a completed sample: distance minus EPSILON, at least 1.
  function automatic int unsigned adjust_distance(int unsigned d, int unsigned eps);
    return (d > eps) ? (d - eps) : 1;
  endfunction

  // States of the block swap engine
  typedef enum logic [2:0] {
    SW_IDLE,     // no swap in progress
    SW_RD_A,     // read the block at the pointer's old frame
    SW_WAIT_A,
    SW_RD_B,     // read the block at the partner's old frame
    SW_WAIT_B,
    SW_WR_A,     // write the first block into the second frame
    SW_WR_B,     // write the second block into the first frame
    SW_ADV       // advance the bank's running pointer
  } swap_state_e;

endpackage
