// Shared constants and types for the fetch-mask-predicted instruction cache.
//
// Default geometry: 32 KB, 32-way set associative, 32-byte lines of eight
// 32-bit instructions, fetched four at a time (a 4-wide processor). That
// gives 1024 lines in 32 sets. The cache size, associativity, line size,
// instructions per line and fetch width are the ones the design is built
// around. The 32-bit address is this design's own choice.
package fmp_pkg;

  parameter int unsigned ADDR_W      = 32;     // byte address width
  parameter int unsigned WORD_W      = 32;     // one instruction
  parameter int unsigned CACHE_BYTES = 32768;  // 32 KB
  parameter int unsigned WAYS        = 32;     // 32-way, CAM tags
  parameter int unsigned LINE_BYTES  = 32;     // 256-bit line
  parameter int unsigned FETCH_W     = 4;      // instructions per fetch

  parameter int unsigned WPL   = LINE_BYTES / (WORD_W / 8);  // words per line (8)
  parameter int unsigned LINES = CACHE_BYTES / LINE_BYTES;   // 1024
  parameter int unsigned SETS  = LINES / WAYS;               // 32

endpackage
