// slc_pkg: types and constants shared by the system level cache (SLC) and
// its prefetchers.
//
// The SLC sits between the GPU's L2 cache slices and external DRAM. Every
// block works on cache-line addresses (byte address >> LINE_OFF_W), so strides
// and offsets are counted in lines. A request carries what the L2 sends to the
// SLC: an identifier, the request reason (which GPU block asked and why, one of
// 48 reasons), the core that sent it, read/write, the cacheable flag and the
// address. The 32-bit byte address, 64-byte line, 8-bit identifier and 8
// outstanding fills are this design's choices; 48 reasons and 4 cores follow
// the standard configuration the design was tuned for.
package slc_pkg;

  localparam int unsigned ADDR_W     = 32;   // byte address width
  localparam int unsigned LINE_BYTES = 64;   // cache line size
  localparam int unsigned LINE_OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned LA_W       = ADDR_W - LINE_OFF_W;  // line address width
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned N_REASONS  = 48;   // request reasons seen at the SLC
  localparam int unsigned REASON_W   = 6;
  localparam int unsigned N_CORES    = 4;    // shader cores
  localparam int unsigned CORE_W     = 2;
  localparam int unsigned ID_W       = 8;    // request identifier (unit, sequence)
  localparam int unsigned N_MSHR     = 8;    // outstanding DRAM reads
  localparam int unsigned MSHR_W     = $clog2(N_MSHR);

  typedef logic [LA_W-1:0]      line_addr_t;
  typedef logic [LINE_BITS-1:0] line_data_t;
  typedef logic [REASON_W-1:0]  reason_t;
  typedef logic [CORE_W-1:0]    core_t;

  // Demand request from an L2 slice (write data travels on its own bus).
  typedef struct packed {
    logic [ID_W-1:0] id;
    reason_t         reason;
    core_t           core;
    logic            write;
    logic            cacheable;
    line_addr_t      addr;
  } slc_req_t;

  // Response to an L2 slice: read data, or a write acknowledge.
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            write;
  } slc_rsp_t;

  // One observed read access, as presented to a prefetcher for training.
  typedef struct packed {
    line_addr_t addr;
    reason_t    reason;
    core_t      core;
    logic       hit;      // the access hit in the SLC
  } train_t;

  // Request to external memory; reads carry the fill slot as tag.
  typedef struct packed {
    logic                write;
    line_addr_t          addr;
    logic [MSHR_W-1:0]   tag;
  } mem_req_t;

  // Prefetcher selected at run time.
  typedef enum logic [2:0] {
    PF_NONE = 3'd0,
    PF_NSP  = 3'd1,
    PF_ADP  = 3'd2,
    PF_ASDP = 3'd3,
    PF_MBOP = 3'd4,
    PF_LLC  = 3'd5
  } pf_sel_e;

  // Event counters kept by the cache.
  typedef struct packed {
    logic [31:0] rd_hits;        // demand read hits
    logic [31:0] rd_misses;      // demand read misses (late prefetches included)
    logic [31:0] wr_reqs;        // demand writes
    logic [31:0] pf_issued;      // prefetch reads sent to DRAM
    logic [31:0] pf_useful;      // first demand hit on a prefetched line
    logic [31:0] pf_late;        // demand miss merged into an in-flight prefetch
    logic [31:0] pf_filtered;    // prefetch dropped: line present or in flight
    logic [31:0] ext_reads;      // all reads sent to DRAM
    logic [31:0] ext_writes;     // all writes sent to DRAM (write-backs, uncached)
    logic [31:0] bypasses;       // non-cacheable requests
  } slc_stats_t;

endpackage
