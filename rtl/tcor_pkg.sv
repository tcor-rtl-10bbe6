// tcor_pkg: types and constants shared by the tile-cache subsystem.
//
// A PMD (primitive metadata) is the 32-bit list entry of the Parameter Buffer:
// a 16-bit Primitive ID, a 4-bit attribute count and a 12-bit OPT Number, the
// ID of the next tile that will read the primitive. The three fields and the
// 12-bit OPT Number follow the document; the 16/4 split of the rest is this
// design's choice, filling four bytes. Tile IDs are positions in the tile traversal order, so
// a larger OPT Number means a later use. OPT_NULL (all ones) marks "never used
// again" and therefore is the farthest possible use.
//
// Memory is addressed in 64-byte blocks (24-bit block address = 1 GiB). An
// attribute is 48 bytes and sits in bits [383:0] of its block; the 12-bit ID of
// the last tile that reads the primitive travels in bits [395:384] of the same
// block, which the 48-byte attribute leaves unused.
package tcor_pkg;

  localparam int ADDR_W    = 24;   // 64-byte block address
  localparam int LINE_W    = 512;  // one 64-byte block
  localparam int ATTR_W    = 384;  // one 48-byte attribute
  localparam int TILE_W    = 12;
  localparam int PRIM_W    = 16;
  localparam int NATTR_W   = 4;
  localparam int PMD_W     = 32;
  localparam logic [TILE_W-1:0] OPT_NULL = '1;
  localparam int LAST_TILE_LSB = ATTR_W;  // last-tile ID position inside an attribute block

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [ATTR_W-1:0] attr_t;
  typedef logic [TILE_W-1:0] tile_t;

  // Which Parameter Buffer section an L2 line belongs to.
  typedef enum logic [1:0] {
    PB_NONE  = 2'd0,
    PB_LISTS = 2'd1,
    PB_ATTRS = 2'd2
  } pb_type_e;

  typedef struct packed {
    logic [PRIM_W-1:0]  prim_id;
    logic [NATTR_W-1:0] num_attr;
    tile_t              opt;
  } pmd_t;

  // One request to the L2: whole-block read or write, tagged with the
  // Parameter Buffer section of the block.
  typedef struct packed {
    logic     we;
    addr_t    addr;
    line_t    wdata;
    pb_type_e pb;
  } l2_req_t;

  // One-cycle event pulses brought out of the top for counting.
  typedef struct packed {
    logic ac_hit;          // Attribute Cache read hit
    logic ac_miss;         // Attribute Cache read miss
    logic ac_bypass;       // write sent around the Attribute Cache to the L2
    logic ac_evict;        // primitive evicted from the Attribute Cache
    logic ac_writeback;    // evicted primitive was dirty
    logic ac_space_evict;  // eviction made to free Attribute Buffer slots
    logic ac_lock_stall;   // read waited for locked lines
    logic plc_hit;
    logic plc_miss;
    logic plc_writeback;
    logic l2_hit;
    logic l2_miss;
    logic l2_dead_victim;  // L2 victim was a dead Parameter Buffer line
    logic l2_writeback;
    logic l2_wb_skipped;   // dirty dead line dropped without write-back
    logic list_overflow;   // PMD dropped: tile list full
    logic queue_stall;     // Tile Fetcher waited for the output queue
    logic tile_done;
  } tcor_events_t;

endpackage
