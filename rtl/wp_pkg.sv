// wp_pkg: constants and types shared by the way-prediction data cache.
//
// The cache is two-way set-associative, 1 KB, with 4-byte lines, as in the
// main configuration of the design. A 32-bit byte address splits into a
// 23-bit tag, a 7-bit set index and a 2-bit byte offset. The tag is further
// split into TagH (upper 13 bits) and TagL (lower 10 bits); only TagL, the
// "effective tag", is held by the Tag Record Buffer. The Tag Record Buffer
// and the Way Record Buffer have three entries. The 32-bit address width is
// this design's choice: it is what the 23-bit tag, 7-bit index and 2-bit
// offset add up to.
package wp_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned DATA_W      = 32;   // one 4-byte line = one word
  localparam int unsigned WAYS        = 2;
  localparam int unsigned LINE_BYTES  = 4;
  localparam int unsigned CACHE_BYTES = 1024;
  localparam int unsigned SETS        = CACHE_BYTES / (WAYS * LINE_BYTES);  // 128
  localparam int unsigned OFFSET_W    = $clog2(LINE_BYTES);                // 2
  localparam int unsigned INDEX_W     = $clog2(SETS);                      // 7
  localparam int unsigned TAG_W       = ADDR_W - INDEX_W - OFFSET_W;       // 23
  localparam int unsigned ETAG_W      = 10;   // TagL, the effective tag
  localparam int unsigned TRB_ENTRIES = 3;

  // What the replacement scheme does with a tag that is being saved into
  // the cache.
  typedef enum logic [1:0] {
    RS_NONE     = 2'd0,  // no entry is free or replaceable: nothing recorded
    RS_UPDATE   = 2'd1,  // tag already in the TRB: set the way bit in the WRB
    RS_REPLACE  = 2'd2,  // an entry whose WRB is all ones takes the new tag
    RS_ALLOCATE = 2'd3   // a free entry takes the new tag
  } rs_action_e;

endpackage
