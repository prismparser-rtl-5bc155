// prism_pkg: sizes, types and the bit layout of the parser's configuration and
// control words, shared by every block of the parser.
//
// The default sizes are those of the enterprise parse graph the parser is
// dimensioned for: 10 protocols (one bitmap bit each), 7 of them transitioning
// nodes (one protocol investigator each), at most 4 outgoing edges per node,
// 4-bit protocol IDs, 16-bit key chunks on a 64-bit bus (4 chunks), a longest
// path that is parsed within 9 bus cycles of 64 bits, and at most 4 distinct
// bitmaps ("directions") that can be in force at any one clock number.
//
// Bit layout. The configuration word (672 bits) is the concatenation, most
// significant first, of the 7 masks, the 7x4 key values and the 7x4 next IDs.
// The control word (1116 bits) is the concatenation of the select/enable sets
// of clocks 1..9 (4 sets of 21 bits per clock) followed by the candidate
// bitmaps of clocks 1..9 (4 bitmaps of 10 bits per clock). Ascending packed
// ranges [0:N-1] keep "first listed = most significant". Inside a
// select/enable set and a bitmap, bit i belongs to protocol ID i+1, so
// protocol ID 1 (the root header, Ethernet) is bit 0. Protocol ID 0 means
// "no next protocol".
package prism_pkg;

  localparam int unsigned N_PROTO  = 10;  // protocols in the graph = bitmap width
  localparam int unsigned N_PI     = 7;   // transitioning nodes = protocol investigators
  localparam int unsigned N_KEYS   = 4;   // max outgoing edges per node = keys per investigator
  localparam int unsigned ID_W     = 4;   // protocol ID width
  localparam int unsigned KEY_W    = 16;  // key chunk width
  localparam int unsigned CHUNK_W  = 64;  // width of the base block bus
  localparam int unsigned N_CHUNKS = CHUNK_W / KEY_W;   // 4 multiplexer inputs
  localparam int unsigned SEL_W    = $clog2(N_CHUNKS);  // 2 select bits
  localparam int unsigned N_CLK    = 9;   // clock numbers (64-bit beats) of the longest path
  localparam int unsigned N_DIR    = 4;   // control sets / candidate bitmaps per clock
  localparam int unsigned DIR_W    = $clog2(N_DIR);
  localparam int unsigned CLK_W    = 8;   // width of a clock-number index (up to 255 beats)
  localparam logic [ID_W-1:0] ROOT_ID = ID_W'(1);       // first header parsed (Ethernet)

  typedef logic [N_PROTO-1:0] bitmap_t;
  typedef logic [ID_W-1:0]    proto_id_t;
  typedef logic [KEY_W-1:0]   key_t;

  // Per-investigator configuration (what one protocol investigator reads).
  typedef struct packed {
    key_t                      mask;
    key_t      [0:N_KEYS-1]    keys;
    proto_id_t [0:N_KEYS-1]    next_ids;
  } pi_cfg_t;

  // Configuration word as loaded (Listing-4 order: masks, keys, next IDs).
  typedef struct packed {
    key_t      [0:N_PI-1]                 mask;
    key_t      [0:N_PI-1][0:N_KEYS-1]     keys;
    proto_id_t [0:N_PI-1][0:N_KEYS-1]     next_ids;
  } cfg_t;

  // One select/enable set: which investigators work this clock and on which chunk.
  typedef struct packed {
    logic [N_PI-1:0][SEL_W-1:0] sel;
    logic [N_PI-1:0]            en;
  } sel_en_t;

  typedef sel_en_t [0:N_DIR-1] sel_en_set_t;   // the sets of one clock number
  typedef bitmap_t [0:N_DIR-1] cand_set_t;     // the candidate bitmaps of one clock number

  // Control word as loaded (Listing-5 order: select/enable arrays, then bitmaps).
  typedef struct packed {
    sel_en_set_t [0:N_CLK-1] sel_en;
    cand_set_t   [0:N_CLK-1] cand;
  } ctrl_t;

  // The header of a packet cut into its first N_CLK 64-bit words, word 0
  // first; this is what the pipeline parser carries from stage to stage.
  typedef logic [0:N_CLK-1][CHUNK_W-1:0] frame_t;

  localparam int unsigned CFG_BITS  = $bits(cfg_t);    // 672
  localparam int unsigned CTRL_BITS = $bits(ctrl_t);   // 1116
  localparam int unsigned LOAD_BITS = CFG_BITS + CTRL_BITS;

  // Configuration of investigator p, gathered from the loaded word.
  function automatic pi_cfg_t pi_cfg(input cfg_t c, input int unsigned p);
    pi_cfg_t r;
    r.mask     = c.mask[p];
    r.keys     = c.keys[p];
    r.next_ids = c.next_ids[p];
    return r;
  endfunction

endpackage
