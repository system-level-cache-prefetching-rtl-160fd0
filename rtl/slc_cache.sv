// slc_cache: system level cache (SLC) between the GPU L2 slices and DRAM.
//
// A SIZE_BYTES, WAYS-way set-associative, write-back, write-allocate cache of
// LINE_BYTES lines (1 MiB, 4 ways, 64 B: 4096 sets). Requests are whole lines,
// as the L2 always moves whole lines. Besides demand requests the cache takes
// prefetch line addresses from the prefetch queue and fetches them into the
// cache, and reports every cacheable demand read to the prefetcher for
// training (address, reason, core, hit).
//
// Operation. One controller handles one action at a time, in this priority:
// a DRAM read response (fill), a demand request, a prefetch address.
//  * Demand read hit: the line is returned. If it was brought in by a prefetch
//    and not yet used, the prefetch counts as useful.
//  * Demand read miss: a fill slot (MSHR) is taken and a DRAM read sent. If a
//    prefetch of the same line is already in flight, the demand joins it
//    instead (a late prefetch). Only one demand miss is outstanding: new
//    demand requests wait until its fill has been answered, while fills and
//    prefetches go on.
//  * Demand write (full line): a hit updates the line and marks it dirty; a
//    miss allocates a victim (written back first if dirty) and installs the
//    line dirty. A fill of the same line still in flight is then discarded.
//  * Non-cacheable requests bypass the cache: a read that misses is fetched
//    without allocation, a write is written through to DRAM (and updates a
//    resident copy).
//  * Prefetch: an address whose line is resident or already in flight is
//    dropped; otherwise it takes a fill slot and sends a DRAM read. A prefetch
//    needs two free slots so that a demand miss always finds one.
//  * Fill: the returned line is installed in the victim way (first invalid
//    way, else the set's round-robin pointer), after writing back a dirty
//    victim. A fill a demand waits for is also returned to the requester.
//
// Interfaces: demand requests and responses and the DRAM request and
// response channels use valid/ready; DRAM reads are tagged with their fill
// slot and may return in any order. The prefetcher's train port uses
// valid/ready; a demand is only accepted while the prefetcher is ready, so the
// training event of a read is never lost. Latency: the response to a read
// hit is valid from the first clock edge after the edge that accepted the
// request (one lookup cycle); that of a miss with a clean victim LAT + 4 edges
// after it, LAT being the edges from DRAM request to DRAM response.
//
// Cache size and associativity follow the standard configuration; the line
// size, the number of fill slots, round-robin replacement, blocking demand
// misses and the bypass handling are this design's choices. The tag/state
// array (one word per set) and the data array each have one write port and
// are read combinationally from registered indices; they are not reset, so
// after reset the controller spends SETS cycles clearing the set state before
// it accepts the first request.
module slc_cache
  import slc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 1024 * 1024,
  parameter int unsigned WAYS       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // demand requests from the L2 slices
  input  logic        req_valid,
  output logic        req_ready,
  input  slc_req_t    req,
  input  line_data_t  req_wdata,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output slc_rsp_t    rsp,
  output line_data_t  rsp_rdata,
  // external memory
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_req_t    mem_req,
  output line_data_t  mem_wdata,
  input  logic        mem_rsp_valid,
  output logic        mem_rsp_ready,
  input  logic [MSHR_W-1:0] mem_rsp_tag,
  input  line_data_t  mem_rsp_rdata,
  // prefetcher training
  output logic        train_valid,
  input  logic        train_ready,
  output train_t      train,
  // prefetch queue
  input  logic        pfq_valid,
  output logic        pfq_ready,
  input  line_addr_t  pfq_addr,
  // statistics
  output slc_stats_t  stats
);

  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = LA_W - SET_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [SET_W-1:0] set_t;
  typedef logic [TAG_W-1:0] tag_t;

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_PF_LOOKUP, S_MEMRD, S_FILL, S_WB, S_INSTALL, S_RSP
  } state_e;

  // state of one set: tags, valid, dirty and prefetched bits, replacement pointer
  typedef struct packed {
    tag_t [WAYS-1:0]  tag;
    logic [WAYS-1:0]  valid;
    logic [WAYS-1:0]  dirty;
    logic [WAYS-1:0]  pfbit;   // brought in by a prefetch, not yet used
    logic [WAY_W-1:0] rrp;
  } meta_t;

  typedef struct packed {
    logic       valid;
    line_addr_t addr;
    logic       is_pf;      // opened by a prefetch
    logic       demanded;   // a demand read waits for this line
    logic       drop;       // do not install the line (bypass, or overwritten)
  } mshr_t;

  // ---------------- arrays ----------------
  // Both arrays have one write port and are not reset: after reset the
  // controller clears the set state one set per cycle (S_INIT).
  meta_t            meta_q  [SETS];
  line_data_t       data_q  [SETS * WAYS];
  meta_t            meta;              // state of the looked-up set

  mshr_t            mshr_q  [N_MSHR];

  // ---------------- controller registers ----------------
  state_e            state_q, after_wb_q;
  set_t              init_q;
  slc_req_t          req_q;
  line_data_t        wdata_q;
  line_addr_t        pfa_q;
  logic [MSHR_W-1:0] slot_q;          // slot being issued or filled
  line_data_t        fill_q;
  logic              dem_wait_q;      // a demand read waits for a fill
  logic [MSHR_W-1:0] dem_slot_q;
  logic              inst_write_q;    // S_INSTALL installs write data, not a fill
  logic [WAY_W-1:0]  vway_q;
  line_addr_t        wb_addr_q;
  line_data_t        wb_data_q;
  slc_rsp_t          rsp_q;
  line_data_t        rsp_data_q;
  slc_stats_t        st_q;

  // ---------------- lookup ----------------
  line_addr_t look_addr;
  set_t       lset;
  tag_t       ltag;
  logic       hit;
  logic [WAY_W-1:0] hway, vway;
  logic       inv_found;

  always_comb begin
    unique case (state_q)
      S_PF_LOOKUP:       look_addr = pfa_q;
      S_FILL, S_INSTALL: look_addr = inst_write_q ? req_q.addr : mshr_q[slot_q].addr;
      default:           look_addr = req_q.addr;
    endcase
    lset = look_addr[SET_W-1:0];
    ltag = look_addr[LA_W-1:SET_W];
    meta = meta_q[lset];
    hit  = 1'b0;
    hway = '0;
    inv_found = 1'b0;
    vway = meta.rrp;
    for (int w = 0; w < WAYS; w++) begin
      if (!hit && meta.valid[w] && meta.tag[w] == ltag) begin
        hit  = 1'b1;
        hway = WAY_W'(w);
      end
      if (!inv_found && !meta.valid[w]) begin
        inv_found = 1'b1;
        vway      = WAY_W'(w);
      end
    end
  end

  // ---------------- fill slots ----------------
  logic              mmatch, free_any;
  logic [MSHR_W-1:0] midx, fidx;
  logic [MSHR_W:0]   nfree;

  always_comb begin
    mmatch   = 1'b0;
    midx     = '0;
    free_any = 1'b0;
    fidx     = '0;
    nfree    = '0;
    for (int m = 0; m < N_MSHR; m++) begin
      if (!mmatch && mshr_q[m].valid && mshr_q[m].addr == look_addr) begin
        mmatch = 1'b1;
        midx   = MSHR_W'(m);
      end
      if (!mshr_q[m].valid) begin
        nfree = nfree + 1'b1;
        if (!free_any) begin
          free_any = 1'b1;
          fidx     = MSHR_W'(m);
        end
      end
    end
  end

  // ---------------- handshakes ----------------
  logic take_fill, take_req, take_pf;
  assign take_fill = (state_q == S_IDLE) && mem_rsp_valid;
  assign take_req  = (state_q == S_IDLE) && !mem_rsp_valid && req_valid && !dem_wait_q &&
                     free_any && train_ready;
  assign take_pf   = (state_q == S_IDLE) && !mem_rsp_valid && !take_req && pfq_valid &&
                     (nfree >= 2);

  assign mem_rsp_ready = take_fill;
  assign req_ready     = (state_q == S_IDLE) && !mem_rsp_valid && !dem_wait_q &&
                         free_any && train_ready;
  assign pfq_ready     = take_pf;

  assign train_valid   = (state_q == S_LOOKUP) && req_q.cacheable && !req_q.write;
  assign train.addr    = req_q.addr;
  assign train.reason  = req_q.reason;
  assign train.core    = req_q.core;
  assign train.hit     = hit;

  assign rsp_valid = (state_q == S_RSP);
  assign rsp       = rsp_q;
  assign rsp_rdata = rsp_data_q;

  assign mem_req_valid = (state_q == S_MEMRD) || (state_q == S_WB);
  always_comb begin
    mem_req = '0;
    if (state_q == S_MEMRD) begin
      mem_req.write = 1'b0;
      mem_req.addr  = mshr_q[slot_q].addr;
      mem_req.tag   = slot_q;
    end else begin
      mem_req.write = 1'b1;
      mem_req.addr  = wb_addr_q;
    end
  end
  assign mem_wdata = wb_data_q;
  assign stats     = st_q;

  // ---------------- array writes ----------------
  logic                   meta_we, data_we;
  set_t                   meta_wa;
  meta_t                  meta_wd;
  logic [SET_W+WAY_W-1:0] data_wa;
  line_data_t             data_wd;

  always_comb begin
    meta_we = 1'b0;
    meta_wa = lset;
    meta_wd = meta;
    data_we = 1'b0;
    data_wa = (SET_W+WAY_W)'(32'(lset) * WAYS + 32'(hway));
    data_wd = wdata_q;
    unique case (state_q)
      S_INIT: begin
        meta_we = 1'b1;
        meta_wa = init_q;
        meta_wd = '0;
      end
      S_LOOKUP: begin
        if (hit && !req_q.write && req_q.cacheable && meta.pfbit[hway]) begin
          meta_we = 1'b1;                       // first use of a prefetched line
          meta_wd.pfbit[hway] = 1'b0;
        end
        if (hit && req_q.write) begin
          data_we = 1'b1;                       // write hit, also non-cacheable
          if (req_q.cacheable) begin
            meta_we = 1'b1;
            meta_wd.dirty[hway] = 1'b1;
            meta_wd.pfbit[hway] = 1'b0;
          end
        end
      end
      S_INSTALL: begin
        data_wa = (SET_W+WAY_W)'(32'(lset) * WAYS + 32'(vway_q));
        if (inst_write_q || !mshr_q[slot_q].drop) begin
          meta_we = 1'b1;
          data_we = 1'b1;
          meta_wd.tag[vway_q]   = ltag;
          meta_wd.valid[vway_q] = 1'b1;
          if (vway_q == meta.rrp) meta_wd.rrp = meta.rrp + 1'b1;
          if (inst_write_q) begin
            meta_wd.dirty[vway_q] = 1'b1;
            meta_wd.pfbit[vway_q] = 1'b0;
          end else begin
            data_wd = fill_q;
            meta_wd.dirty[vway_q] = 1'b0;
            meta_wd.pfbit[vway_q] = mshr_q[slot_q].is_pf && !mshr_q[slot_q].demanded;
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (meta_we) meta_q[meta_wa] <= meta_wd;
  end

  always_ff @(posedge clk) begin
    if (data_we) data_q[data_wa] <= data_wd;
  end

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N_MSHR; m++) mshr_q[m] <= '0;
      state_q      <= S_INIT;
      init_q       <= '0;
      after_wb_q   <= S_IDLE;
      req_q        <= '0;
      wdata_q      <= '0;
      pfa_q        <= '0;
      slot_q       <= '0;
      fill_q       <= '0;
      dem_wait_q   <= 1'b0;
      dem_slot_q   <= '0;
      inst_write_q <= 1'b0;
      vway_q       <= '0;
      wb_addr_q    <= '0;
      wb_data_q    <= '0;
      rsp_q        <= '0;
      rsp_data_q   <= '0;
      st_q         <= '0;
    end else begin
      unique case (state_q)
        S_INIT: begin
          init_q <= init_q + 1'b1;
          if (32'(init_q) == SETS - 1) state_q <= S_IDLE;
        end

        S_IDLE: begin
          if (take_fill) begin
            slot_q       <= mem_rsp_tag;
            fill_q       <= mem_rsp_rdata;
            inst_write_q <= 1'b0;
            state_q      <= S_FILL;
          end else if (take_req) begin
            req_q   <= req;
            wdata_q <= req_wdata;
            state_q <= S_LOOKUP;
          end else if (take_pf) begin
            pfa_q   <= pfq_addr;
            state_q <= S_PF_LOOKUP;
          end
        end

        S_LOOKUP: begin
          rsp_q.id    <= req_q.id;
          rsp_q.write <= req_q.write;
          if (!req_q.cacheable) st_q.bypasses <= st_q.bypasses + 1;
          if (req_q.write) st_q.wr_reqs <= st_q.wr_reqs + 1;
          if (!req_q.write) begin
            if (hit) begin
              // read hit (cacheable, or non-cacheable served from a resident copy)
              rsp_data_q <= data_q[32'(lset) * WAYS + 32'(hway)];
              if (req_q.cacheable) st_q.rd_hits <= st_q.rd_hits + 1;
              if (req_q.cacheable && meta.pfbit[hway])
                st_q.pf_useful <= st_q.pf_useful + 1;
              state_q <= S_RSP;
            end else if (mmatch && req_q.cacheable) begin
              // join a fill already in flight
              st_q.rd_misses <= st_q.rd_misses + 1;
              if (mshr_q[midx].is_pf && !mshr_q[midx].demanded)
                st_q.pf_late <= st_q.pf_late + 1;
              mshr_q[midx].demanded <= 1'b1;
              dem_wait_q <= 1'b1;
              dem_slot_q <= midx;
              state_q    <= S_IDLE;
            end else begin
              if (req_q.cacheable) st_q.rd_misses <= st_q.rd_misses + 1;
              mshr_q[fidx] <= '{valid: 1'b1, addr: req_q.addr, is_pf: 1'b0,
                                demanded: 1'b1, drop: !req_q.cacheable};
              dem_wait_q <= 1'b1;
              dem_slot_q <= fidx;
              slot_q     <= fidx;
              state_q    <= S_MEMRD;
            end
          end else if (!req_q.cacheable) begin
            // write-through bypass; keep a resident copy current
            if (mmatch) mshr_q[midx].drop <= 1'b1;
            wb_addr_q  <= req_q.addr;
            wb_data_q  <= wdata_q;
            after_wb_q <= S_RSP;
            state_q    <= S_WB;
          end else if (hit) begin
            state_q <= S_RSP;
          end else begin
            // write miss: allocate, writing back a dirty victim first
            if (mmatch) mshr_q[midx].drop <= 1'b1;
            inst_write_q <= 1'b1;
            vway_q       <= vway;
            if (meta.valid[vway] && meta.dirty[vway]) begin
              wb_addr_q  <= {meta.tag[vway], lset};
              wb_data_q  <= data_q[32'(lset) * WAYS + 32'(vway)];
              after_wb_q <= S_INSTALL;
              state_q    <= S_WB;
            end else begin
              state_q <= S_INSTALL;
            end
          end
        end

        S_PF_LOOKUP: begin
          if (hit || mmatch) begin
            st_q.pf_filtered <= st_q.pf_filtered + 1;
            state_q <= S_IDLE;
          end else begin
            mshr_q[fidx] <= '{valid: 1'b1, addr: pfa_q, is_pf: 1'b1,
                              demanded: 1'b0, drop: 1'b0};
            slot_q  <= fidx;
            state_q <= S_MEMRD;
          end
        end

        S_MEMRD: begin
          if (mem_req_ready) begin
            st_q.ext_reads <= st_q.ext_reads + 1;
            if (mshr_q[slot_q].is_pf) st_q.pf_issued <= st_q.pf_issued + 1;
            state_q <= S_IDLE;
          end
        end

        S_FILL: begin
          vway_q <= vway;
          if (!mshr_q[slot_q].drop && meta.valid[vway] && meta.dirty[vway]) begin
            wb_addr_q  <= {meta.tag[vway], lset};
            wb_data_q  <= data_q[32'(lset) * WAYS + 32'(vway)];
            after_wb_q <= S_INSTALL;
            state_q    <= S_WB;
          end else begin
            state_q <= S_INSTALL;
          end
        end

        S_WB: begin
          if (mem_req_ready) begin
            st_q.ext_writes <= st_q.ext_writes + 1;
            state_q <= after_wb_q;
          end
        end

        S_INSTALL: begin
          if (inst_write_q) begin
            inst_write_q <= 1'b0;
            state_q      <= S_RSP;
          end else begin
            mshr_q[slot_q].valid <= 1'b0;
            if (mshr_q[slot_q].demanded) begin
              rsp_data_q <= fill_q;
              dem_wait_q <= 1'b0;
              state_q    <= S_RSP;
            end else begin
              state_q <= S_IDLE;
            end
          end
        end

        S_RSP: begin
          if (rsp_ready) state_q <= S_IDLE;
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------- protocol checks ----------------
  a_train_taken: assert property (@(posedge clk) disable iff (!rst_n)
    train_valid |-> train_ready);
  a_fill_known: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid && mem_rsp_ready |-> mshr_q[mem_rsp_tag].valid);
  a_demand_slot: assert property (@(posedge clk) disable iff (!rst_n)
    dem_wait_q |-> mshr_q[dem_slot_q].valid && mshr_q[dem_slot_q].demanded);
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req));

endmodule
