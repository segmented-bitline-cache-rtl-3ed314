// sbl_pkg: shared constants and types of the segmented bitline cache.
//
// The default geometry is the L1 cache the design is built around: 16 KB,
// 4-way set associative, 64-byte lines, hence 64 sets (64 rows per array),
// with the bitlines cut into 8 segments of 8 rows each. Address and word
// widths (32-bit byte address, 64-bit data word) are this design's own
// choice; the cache geometry and segment count follow the source design.
package sbl_pkg;

  localparam int unsigned CACHE_BYTES = 16384;
  localparam int unsigned WAYS        = 4;
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned SETS        = CACHE_BYTES / (WAYS * LINE_BYTES);  // 64
  localparam int unsigned SEGMENTS    = 8;
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_W      = 64;
  localparam int unsigned CNT_W       = 32;
  // Cycles between two dynamic remaps.
  localparam int unsigned REMAP_INTERVAL = 1_000_000;

  // How the cluster-to-segment configuration register is filled.
  //   MAP_STATIC : loaded once from a profile (static_map port), never changed
  //                by the hardware.
  //   MAP_DCF    : dynamic remap, counters flushed at every remap
  //                ("dynamic counter flush").
  //   MAP_DNCF   : dynamic remap, counters accumulate from reset
  //                ("dynamic no counter flush").
  typedef enum logic [1:0] {
    MAP_STATIC = 2'd0,
    MAP_DCF    = 2'd1,
    MAP_DNCF   = 2'd2
  } map_mode_e;

endpackage
