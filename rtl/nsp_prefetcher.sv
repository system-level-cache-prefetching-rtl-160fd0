// nsp_prefetcher: Naive Stride Prefetcher (NSP).
//
// A stride prediction table (SPT) of TABLESIZE entries tracks access chains
// that move by a fixed stride of STRIDE lines, up or down. Each entry holds
// the last line address of its chain, a confidence (consecutive accesses at
// the fixed stride), a recently_prefetched flag, a lifetime counted in read
// accesses, and the chain's direction.
//
// For every trained read access A (one per train handshake):
//   1. the table is searched for an entry at A-STRIDE (upward chain) or
//      A+STRIDE (downward chain). A hit raises its confidence by one, extends
//      its lifetime by LIFETIMEEXT, clears recently_prefetched and moves it to
//      A. Without a match, A takes a free entry with lifetime LIFETIME.
//   2. every lifetime is decremented; an entry reaching zero is freed.
//   3. on a miss (or on any access when PREFETCHHITS is set), every entry with
//      confidence >= CONFTHRESH that is not recently_prefetched issues DEGREE
//      prefetches at address + i*stride, i = 1+DISTANCE .. DISTANCE+DEGREE, and
//      is marked recently_prefetched.
// Table update and search take the cycle of the handshake; the prefetches then
// leave one per cycle on the pf valid/ready port, and train_ready stays low
// until the last one has been accepted. The algorithm and the default
// parameters follow the NSP as published; the stride value (1 line), the
// saturating counter widths and the choice of the lowest-numbered matching or
// free entry are this design's choices. A full table drops the new chain.
module nsp_prefetcher
  import slc_pkg::*;
#(
  parameter int unsigned TABLESIZE    = 8,
  parameter int unsigned DEGREE       = 3,
  parameter int unsigned DISTANCE     = 0,
  parameter int unsigned CONFTHRESH   = 0,
  parameter int unsigned LIFETIME     = 80,
  parameter int unsigned LIFETIMEEXT  = 40,
  parameter bit          PREFETCHHITS = 1'b0,
  parameter int unsigned STRIDE       = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       train_valid,
  output logic       train_ready,
  input  train_t     train,
  output logic       pf_valid,
  input  logic       pf_ready,
  output line_addr_t pf_addr
);

  localparam int unsigned LT_W   = 8;
  localparam int unsigned CONF_W = 4;
  localparam int unsigned IDX_W  = $clog2(TABLESIZE);
  localparam int unsigned CNT_W  = $clog2(DEGREE + 1);
  localparam logic [LT_W-1:0]   LT_MAX   = '1;
  localparam logic [CONF_W-1:0] CONF_MAX = '1;

  typedef struct packed {
    logic              valid;
    line_addr_t        addr;
    logic [CONF_W-1:0] conf;
    logic              recent;   // recently_prefetched
    logic [LT_W-1:0]   life;
    logic              positive;
  } spe_t;

  spe_t spt_q [TABLESIZE];
  logic [TABLESIZE-1:0] pend_q;     // entries still to issue
  logic [CNT_W-1:0]     cnt_q;      // prefetches issued for the current entry
  logic                 busy;

  assign busy        = |pend_q;
  assign train_ready = !busy;

  // ---------------- search ----------------
  line_addr_t a_up, a_dn;
  assign a_up = train.addr - line_addr_t'(STRIDE);
  assign a_dn = train.addr + line_addr_t'(STRIDE);

  logic             found, free_found;
  logic [IDX_W-1:0] match_idx, free_idx;
  logic             match_pos;

  always_comb begin
    found      = 1'b0;
    free_found = 1'b0;
    match_idx  = '0;
    free_idx   = '0;
    match_pos  = 1'b1;
    for (int e = 0; e < TABLESIZE; e++) begin
      if (!found && spt_q[e].valid &&
          (spt_q[e].addr == a_up || spt_q[e].addr == a_dn)) begin
        found     = 1'b1;
        match_idx = IDX_W'(e);
        match_pos = (spt_q[e].addr == a_up);
      end
      if (!free_found && !spt_q[e].valid) begin
        free_found = 1'b1;
        free_idx   = IDX_W'(e);
      end
    end
  end

  // ---------------- table update (combinational next state) ----------------
  spe_t spt_upd [TABLESIZE];
  logic [TABLESIZE-1:0] trig;
  logic do_pf;

  assign do_pf = !train.hit || PREFETCHHITS;

  always_comb begin
    for (int e = 0; e < TABLESIZE; e++) begin
      spe_t s;
      s = spt_q[e];
      if (found && IDX_W'(e) == match_idx) begin
        s.addr     = train.addr;
        s.conf     = (s.conf == CONF_MAX) ? s.conf : s.conf + 1'b1;
        s.life     = (s.life > LT_MAX - LT_W'(LIFETIMEEXT)) ? LT_MAX
                                                            : s.life + LT_W'(LIFETIMEEXT);
        s.recent   = 1'b0;
        s.positive = match_pos;
      end else if (!found && free_found && IDX_W'(e) == free_idx) begin
        s.valid    = 1'b1;
        s.addr     = train.addr;
        s.conf     = '0;
        s.life     = LT_W'(LIFETIME);
        s.recent   = 1'b0;
        s.positive = 1'b1;
      end
      if (s.valid) begin
        s.life = s.life - 1'b1;
        if (s.life == '0) s.valid = 1'b0;
      end
      spt_upd[e] = s;
      trig[e] = do_pf && s.valid && (s.conf >= CONF_W'(CONFTHRESH)) && !s.recent;
    end
  end

  // ---------------- issue ----------------
  logic [IDX_W-1:0] cur;
  always_comb begin
    cur = '0;
    for (int e = TABLESIZE - 1; e >= 0; e--)
      if (pend_q[e]) cur = IDX_W'(e);
  end

  line_addr_t step;
  assign step     = line_addr_t'((DISTANCE + 1 + 32'(cnt_q)) * STRIDE);
  assign pf_valid = busy;
  assign pf_addr  = spt_q[cur].positive ? spt_q[cur].addr + step
                                        : spt_q[cur].addr - step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < TABLESIZE; e++) spt_q[e] <= '0;
      pend_q <= '0;
      cnt_q  <= '0;
    end else if (!busy) begin
      if (train_valid) begin
        for (int e = 0; e < TABLESIZE; e++) spt_q[e] <= spt_upd[e];
        pend_q <= trig;
        cnt_q  <= '0;
      end
    end else if (pf_ready) begin
      if (cnt_q == CNT_W'(DEGREE - 1)) begin
        cnt_q             <= '0;
        pend_q[cur]       <= 1'b0;
        spt_q[cur].recent <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  a_pf_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && $stable(pf_addr));

endmodule
