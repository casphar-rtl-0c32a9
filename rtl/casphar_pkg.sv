// casphar_pkg: types and constants shared by the CASPHAr last-level cache.
//
// The cache geometry defaults follow the evaluated system: a 4 MB, 16-way
// LLC with 64-byte lines, i.e. 4096 sets. Addresses are 64-bit byte
// addresses, so that the two eviction range registers hold 128 bits together.
// Request, response and configuration encodings are this design's own: the
// LLC sees whole-line requests from two agents (host CPU through its L2, and
// the accelerator), each tagged with an agent-local id.
package casphar_pkg;

  localparam int unsigned ADDR_W     = 64;   // byte address width
  localparam int unsigned LINE_BYTES = 64;   // cache block size
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned ID_W       = 4;    // request id width per agent

  localparam int unsigned LLC_SETS_DEFAULT = 4096; // 4 MB / (16 ways * 64 B)
  localparam int unsigned LLC_WAYS_DEFAULT = 16;
  localparam int unsigned WAIT_DEPTH_DEFAULT = 8;

  typedef logic [ADDR_W-1:0]     addr_t;
  typedef logic [LINE_W-1:0]     line_t;
  typedef logic [LINE_BYTES-1:0] bmask_t;
  typedef logic [ID_W-1:0]       id_t;

  // Request opcodes seen by the LLC.
  //   OP_READ  : line fill request (load miss from L2, accelerator read)
  //   OP_WRITE : masked line write (accelerator store, L2 write-back)
  //   OP_FLUSH : clflush arriving from the CPU, carrying the line's data
  typedef enum logic [1:0] {
    OP_READ  = 2'd0,
    OP_WRITE = 2'd1,
    OP_FLUSH = 2'd2
  } op_e;

  // Which agent a request came from.
  typedef enum logic {
    SRC_CPU = 1'b0,
    SRC_ACC = 1'b1
  } src_e;

  // Replacement policy modes.
  //   POL_LRU      : unmodified LRU (CASPHAr-LRU-Orig)
  //   POL_CONSUMED : consumed lines are evicted first (CASPHAr-LRU)
  //   POL_EXT      : additionally not-ready before ready lines (CASPHAr-LRU-Ext)
  typedef enum logic [1:0] {
    POL_LRU      = 2'd0,
    POL_CONSUMED = 2'd1,
    POL_EXT      = 2'd2
  } policy_e;

  // Why a victim was chosen.
  typedef enum logic [1:0] {
    VR_INVALID  = 2'd0,  // a free way
    VR_CONSUMED = 2'd1,  // oldest consumed line
    VR_NOTREADY = 2'd2,  // oldest line that is not produced-and-waiting
    VR_LRU      = 2'd3   // plain least recently used
  } vreason_e;

  typedef struct packed {
    op_e    op;
    addr_t  addr;
    line_t  wdata;
    bmask_t wmask;
    id_t    id;
  } req_t;

  typedef struct packed {
    op_e   op;
    id_t   id;
    line_t rdata;
  } rsp_t;

  // Shared region bounds, byte addresses, [start, end).
  typedef struct packed {
    addr_t c2a_start;
    addr_t c2a_end;
    addr_t a2c_start;
    addr_t a2c_end;
  } regions_t;

  // Configuration register map (64-bit registers, word index).
  localparam logic [2:0] CFG_C2A_START = 3'd0;
  localparam logic [2:0] CFG_C2A_END   = 3'd1;
  localparam logic [2:0] CFG_A2C_START = 3'd2;
  localparam logic [2:0] CFG_A2C_END   = 3'd3;
  localparam logic [2:0] CFG_CTRL      = 3'd4; // [0] evict range enable, [2:1] policy
  localparam logic [2:0] CFG_EV_MIN    = 3'd5; // read only
  localparam logic [2:0] CFG_EV_MAX    = 3'd6; // read only
  localparam logic [2:0] CFG_STATUS    = 3'd7; // read only: [0] busy, [1] range valid

  // One-cycle event pulses, for performance counters and testbenches.
  typedef struct packed {
    logic hit;           // request hit a ready or untracked line
    logic miss;          // line not resident, fetched from memory
    logic sync_miss;     // consumer read parked until the line is produced
    logic range_skip;    // consumer miss outside Min/Max: parked without a fetch
    logic fe_release;    // consumer miss fetched and F/E bit was set
    logic fe_stall;      // consumer miss fetched but F/E bit was clear
    logic produce;       // a line became ready
    logic consume;       // a ready line was consumed
    logic wake;          // a produce released at least one parked read
    logic replay;        // a parked read was replayed
    logic evict_wb;      // victim written back to memory
    logic evict_ready;   // produced, unconsumed shared line evicted
    logic victim_consumed; // victim chosen because it was consumed
    logic victim_notready; // victim chosen to keep ready lines resident
    logic wait_full;     // a consumer read was refused, wait table full
    logic flush_wb;      // conventional clflush of an unshared line
    logic reconfig;      // metadata re-initialisation walk finished
  } events_t;

endpackage
