// mc2rt_pkg: constants and types shared by the cache-coherent read-trace (mc2RT)
// subsystem. The block size (32 B) and address width follow the evaluated x86
// multicore; the field widths of the internal message record (32-bit time and
// hit counter) are this design's own choice. The on-wire encoding of a message is
// variable-length and is produced by trace_msg_encoder.
package mc2rt_pkg;

  localparam int ADDR_W      = 32;              // byte address
  localparam int WORD_W      = 32;              // load/store word
  localparam int BLOCK_BYTES = 32;              // L1D block size
  localparam int BLOCK_BITS  = BLOCK_BYTES * 8; // CB field width
  localparam int OFFS_W      = $clog2(BLOCK_BYTES);
  localparam int BADDR_W     = ADDR_W - OFFS_W; // block address
  localparam int WORDS_PER_BLOCK = BLOCK_BYTES / (WORD_W / 8);
  localparam int WSEL_W      = $clog2(WORDS_PER_BLOCK);
  localparam int CC_W        = 32;              // global clock-cycle counter
  localparam int THC_W       = 32;              // THCnt field in the message record
  localparam int MAX_CORES   = 8;
  localparam int PI_MAX_W    = $clog2(MAX_CORES);

  // MOESI coherence states
  typedef enum logic [2:0] {
    ST_I = 3'd0,
    ST_S = 3'd1,
    ST_E = 3'd2,
    ST_O = 3'd3,
    ST_M = 3'd4
  } moesi_e;

  // Coherent bus transactions
  typedef enum logic [1:0] {
    BUS_RD   = 2'd0,  // coherent read (read miss)
    BUS_RDX  = 2'd1,  // coherent read and invalidate (write miss)
    BUS_UPGR = 2'd2   // coherent invalidate (write hit in S or O)
  } bus_cmd_e;

  // cache -> bus request; wb_* is the victim write-back, valid at the grant cycle
  typedef struct packed {
    logic                  valid;
    bus_cmd_e              cmd;
    logic [BADDR_W-1:0]    baddr;
    logic                  wb_valid;
    logic [BADDR_W-1:0]    wb_baddr;
    logic [BLOCK_BITS-1:0] wb_data;
  } bus_req_t;

  // bus -> requesting cache
  typedef struct packed {
    logic                  gnt;        // request taken (snoop cycle)
    logic                  done;       // transaction finished, data/tbit valid
    logic                  from_cache; // block supplied by another L1
    logic                  tbit;       // trace bit inherited from the supplier
    logic [BLOCK_BITS-1:0] data;
  } bus_rsp_t;

  // bus -> snooping caches
  typedef struct packed {
    logic               valid;
    bus_cmd_e           cmd;
    logic [BADDR_W-1:0] baddr;
  } snoop_req_t;

  // snooping cache -> bus (combinational lookup)
  typedef struct packed {
    logic                  hit;
    moesi_e                state;
    logic                  tbit;
    logic [BLOCK_BITS-1:0] data;
  } snoop_rsp_t;

  // Trace message record held in the trace buffers (before encoding)
  typedef struct packed {
    logic [CC_W-1:0]       cc;     // absolute time stamp, used for ordering only
    logic [CC_W-1:0]       dcc;    // CC - PCC
    logic [PI_MAX_W-1:0]   pi;     // core index
    logic [THC_W-1:0]      thcnt;  // trace hits since the previous trace miss
    logic [BLOCK_BITS-1:0] cb;     // the whole cache block
  } trace_msg_t;

  // Encoded message: 5 chunks of 8 bits for each 32-bit variable-length field
  localparam int VLE_CHUNKS_MAX = (CC_W + 6) / 7;
  localparam int MSG_MAX_BITS   = 8*VLE_CHUNKS_MAX + PI_MAX_W + 8*((THC_W + 6) / 7) + BLOCK_BITS;
  localparam int MSG_LEN_W      = $clog2(MSG_MAX_BITS + 1);

endpackage
