// seq_cache_pkg: types and constants shared by the sequential way-access cache.
//
// The cache is two-way set associative with 16-byte lines of four 32-bit
// words, as in the evaluated configuration.  A byte address splits, from the
// least significant bit upward, into a 2-bit byte offset, a 2-bit word offset
// within the line, the set index and the tag.  Each tag-array entry holds a
// valid bit, a dirty bit (this design is write-back, which is its own choice)
// and the tag.  Sizes that depend on the cache capacity are parameters of the
// modules; this package fixes only what the whole design shares.
package seq_cache_pkg;

  localparam int unsigned WORD_BITS  = 32;               // issue size: 4 bytes
  localparam int unsigned WORD_BYTES = WORD_BITS / 8;
  localparam int unsigned WORDS_PER_LINE = 4;            // 16-byte line
  localparam int unsigned LINE_BITS  = WORD_BITS * WORDS_PER_LINE;
  localparam int unsigned BYTE_OFF_W = 2;
  localparam int unsigned WORD_OFF_W = 2;
  localparam int unsigned LINE_OFF_W = BYTE_OFF_W + WORD_OFF_W;

  // Data memory cells.  A way's data array of up to MAX_CELL_BYTES is one
  // cell; a larger one is split into SPLIT_CELL_BYTES cells, as in the
  // thesis's 128 KB cache (four 16 KB cells per way, because a 32 KB cell
  // is too slow).
  localparam int unsigned MAX_CELL_BYTES   = 32768;
  localparam int unsigned SPLIT_CELL_BYTES = 16384;

  typedef logic [WORD_BITS-1:0]  word_t;
  typedef logic [WORD_BYTES-1:0] be_t;
  typedef logic [LINE_BITS-1:0]  line_t;
  typedef logic [WORD_OFF_W-1:0] woff_t;

  // Ways in probe order: way 0 is always searched first.
  typedef enum logic {WAY0 = 1'b0, WAY1 = 1'b1} way_t;

  // Controller states.
  typedef enum logic [3:0] {
    S_IDLE,      // ready for a request
    S_PROBE0,    // way 0 tag and data are on the array outputs
    S_PROBE1,    // way 1 tag and data are on the array outputs
    S_SWAP_RD,   // promotion: read word i of both ways
    S_SWAP_WR,   // promotion: write word i of both ways, exchanged
    S_WB_RD,     // miss: read the dirty way-1 line into the line buffer
    S_WB_MEM,    // miss: write-back transfer to main memory
    S_MOVE,      // miss: copy the way-0 line into way 1
    S_FILL_MEM,  // miss: read transfer from main memory
    S_FILL_WR,   // miss: write the refilled line into way 0
    S_RESP       // miss: return the requested word
  } state_t;

endpackage
