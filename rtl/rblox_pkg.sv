// rblox_pkg: types and constants shared by the range-lock unit (RBlox) and
// the range-tagged index cache (METAL-IX).
//
// Keys, range bounds and node pointers are 32-bit unsigned integers, the
// width of the "uint" arguments of the lock API and of the 2 x 32-bit range
// comparator. Tile ids are 8 bits so that the largest explored array
// (256 tiles) can be addressed. A request names one of five operations:
//   OP_LOCK    r_lock(Lo, Hi, type, lt_idx): a fresh lock, or a contraction
//              (trim) of the entry lt_idx that the tile already holds
//   OP_UNLOCK  r_unlock(lt_idx, node_ptr, safe): leave the entry; a non-null
//              node_ptr registers the freed range in the unlocked-range table
//   OP_TRYLOCK r_trylock(key): instant lock of the narrowest safe unlocked
//              range that holds the key
//   OP_CHECK   range probe used by lock-free readers to validate
//   OP_FILL    a read-only traversal registers an unlocked safe range
// The lock type follows the API encoding: shared = 1, exclusive = 0.
package rblox_pkg;

  localparam int KEY_W   = 32;
  localparam int PTR_W   = 32;
  localparam int TILE_W  = 8;
  localparam int LTIDX_W = 8;

  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [PTR_W-1:0]   ptr_t;
  typedef logic [TILE_W-1:0]  tile_t;
  typedef logic [LTIDX_W-1:0] ltidx_t;

  typedef enum logic [2:0] {
    OP_LOCK    = 3'd0,
    OP_UNLOCK  = 3'd1,
    OP_TRYLOCK = 3'd2,
    OP_CHECK   = 3'd3,
    OP_FILL    = 3'd4
  } op_e;

  typedef enum logic {
    LK_EX = 1'b0,
    LK_SH = 1'b1
  } lock_e;

  // Request from a tile. For OP_TRYLOCK the key travels in lo.
  typedef struct packed {
    op_e    op;
    tile_t  tile;
    key_t   lo;
    key_t   hi;
    lock_e  ltype;
    logic   trim;      // OP_LOCK: contract entry lt_idx instead of a fresh lock
    ltidx_t lt_idx;
    ptr_t   node_ptr;  // OP_UNLOCK / OP_FILL: node of the range, 0 = none
    logic   safe;      // OP_UNLOCK / OP_FILL: the range is safe for mutation
  } rb_req_t;

  // Response to the tile that issued the request.
  typedef struct packed {
    op_e    op;
    tile_t  tile;
    logic   ok;          // lock granted / unlock accepted / trylock hit / fill stored
    ltidx_t lt_idx;      // entry holding the lock
    ptr_t   node_ptr;    // OP_TRYLOCK: node of the grabbed range (0 on failure)
    key_t   lo;          // OP_TRYLOCK: grabbed range
    key_t   hi;
    logic   locked_any;  // OP_CHECK: range overlaps a locked range of another tile
    logic   locked_ex;   // OP_CHECK: ... an exclusive one
  } rb_resp_t;

  // Commands from the controller to the LTable.
  typedef enum logic [2:0] {
    LT_NOP    = 3'd0,
    LT_ALLOC  = 3'd1,  // write a new entry owned by one tile
    LT_JOIN   = 3'd2,  // add a tile to a shared entry
    LT_UPDATE = 3'd3,  // trim in place: new bounds and type
    LT_LEAVE  = 3'd4   // remove a tile; the entry frees when no tile is left
  } lt_cmd_e;

  // Commands to the UTable.
  typedef enum logic [1:0] {
    UT_LOOKUP = 2'd0,  // narrowest safe range holding a key
    UT_INSERT = 2'd1,  // register an unlocked range in every segment it spans
    UT_INVAL  = 2'd2   // drop entries overlapping a range
  } ut_cmd_e;

  // ---------------------------------------------------------------- METAL-IX
  // An index node as the index cache and the walker see it: a B+tree node
  // with up to IX_NKEYS sorted separator keys and IX_NKEYS+1 child pointers
  // (7 keys and 8 pointers fill a 64-byte block with 32-bit fields). Child i
  // holds the keys k with keys[i-1] <= k < keys[i]. In a leaf the "children"
  // are the data objects. [lo, hi] is the node's key range, the cache tag.
  localparam int IX_NKEYS   = 7;
  localparam int IX_LEVEL_W = 4;
  localparam int IX_NK_W    = $clog2(IX_NKEYS + 1);

  typedef struct packed {
    key_t                      lo;
    key_t                      hi;
    logic [IX_LEVEL_W-1:0]     level;   // 0 = root, larger = closer to the leaves
    logic                      leaf;
    logic [IX_NK_W-1:0]        nkeys;   // separators in use
    key_t [IX_NKEYS-1:0]       keys;
    ptr_t [IX_NKEYS:0]         ptrs;
    ptr_t                      self;    // the node's own address
  } ix_node_t;

endpackage
