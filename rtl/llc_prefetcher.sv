// llc_prefetcher: last-level collective prefetcher (LLC).
//
// A reference prediction table (RPT) holds one stride prediction entry (SPE)
// per (core, reason) pair, N_CORES * N_REASONS = 192 entries, addressed by
// core * N_REASONS + reason, the dense form of concatenating the two. An SPE
// learns a stride like a classic stride prefetcher: the first access records
// the base address, the second the stride, and every access that repeats the
// stride raises the confidence. An access that breaks the stride removes the
// SPE; the access then starts a fresh SPE. Once its confidence is above
// CONFTHRESH an SPE joins the group of its reason in the group table (one
// entry per reason, GTTABLESIZE = 48), so a group collects the confident SPEs
// of all cores for one reason.
//
// When an access updates a grouped SPE on a miss (or any access with
// PREFETCHHITS), the whole group prefetches, members taken in ascending base
// address order and the degree as the outer loop:
//   Base_1+S_1, ..., Base_N+S_N, ..., Base_1+S_1*DEGREE, ..., Base_N+S_N*DEGREE.
// With one SPE per core and reason a group has at most N_CORES members, so the
// list ordered by base address is formed by ranking the members when the
// group fires rather than by a linked list.
//
// Timing: the RPT and group table are updated in the cycle of the train
// handshake; the group's prefetches then leave one per cycle on the pf
// valid/ready port while train_ready is low. The RPT, group table, core and
// reason indexing, removal on a stride break and the issue order follow the
// LLC prefetcher as adapted for the SLC. Restarting a removed SPE from the
// breaking access, skipping the bases themselves (already accessed) and
// prefetching on misses only are this design's choices.
module llc_prefetcher
  import slc_pkg::*;
#(
  parameter int unsigned DEGREE       = 2,
  parameter int unsigned CONFTHRESH   = 0,
  parameter int unsigned NCORES       = N_CORES,
  parameter int unsigned GTTABLESIZE  = N_REASONS,
  parameter bit          PREFETCHHITS = 1'b0
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

  localparam int unsigned RPTSIZE = NCORES * GTTABLESIZE;
  localparam int unsigned CONF_W  = 4;
  localparam int unsigned MEM_W   = $clog2(NCORES + 1);
  localparam int unsigned POS_W   = (NCORES > 1) ? $clog2(NCORES) : 1;
  localparam int unsigned DEG_W   = $clog2(DEGREE + 1);
  localparam logic [CONF_W-1:0] CONF_MAX = '1;

  typedef struct packed {
    logic              valid;
    logic              has_stride;
    line_addr_t        base;
    line_addr_t        stride;
    logic [CONF_W-1:0] conf;
  } spe_t;

  spe_t              rpt_q [RPTSIZE];
  logic [NCORES-1:0] gt_q  [GTTABLESIZE];   // group members per reason, by core

  // issue state: group snapshot sorted by base address
  line_addr_t       ib_q [NCORES];
  line_addr_t       is_q [NCORES];
  logic [MEM_W-1:0] icnt_q;               // members in the snapshot
  logic [POS_W-1:0] ipos_q;               // member being issued
  logic [DEG_W-1:0] ideg_q;               // current multiplier, 0 = idle

  assign train_ready = (ideg_q == '0);
  assign pf_valid    = (ideg_q != '0);
  assign pf_addr     = ib_q[ipos_q] + is_q[ipos_q] * line_addr_t'(ideg_q);

  // ---------------- RPT update ----------------
  logic        in_range;
  int unsigned ridx;
  spe_t        cur, nxt;
  logic        joined;                    // SPE is grouped after the update

  assign in_range = (32'(train.reason) < GTTABLESIZE) && (32'(train.core) < NCORES);
  assign ridx     = in_range ? 32'(train.core) * GTTABLESIZE + 32'(train.reason) : 0;

  always_comb begin
    cur = rpt_q[ridx];
    nxt = cur;
    if (!cur.valid || (cur.has_stride && train.addr - cur.base != cur.stride)) begin
      nxt.valid      = 1'b1;          // new SPE, or removed and started afresh
      nxt.has_stride = 1'b0;
      nxt.stride     = '0;
      nxt.conf       = '0;
    end else if (!cur.has_stride) begin
      nxt.has_stride = 1'b1;
      nxt.stride     = train.addr - cur.base;
      nxt.conf       = '0;
    end else begin
      nxt.conf       = (cur.conf == CONF_MAX) ? cur.conf : cur.conf + 1'b1;
    end
    nxt.base = train.addr;
    joined   = nxt.has_stride && nxt.stride != '0 && 32'(nxt.conf) > CONFTHRESH;
  end

  // ---------------- group snapshot, ranked by base ----------------
  logic [NCORES-1:0] grp;
  line_addr_t        mb [NCORES];
  line_addr_t        ms [NCORES];
  line_addr_t        sb [NCORES];
  line_addr_t        ss [NCORES];
  logic [MEM_W-1:0]  nmem;

  always_comb begin
    grp = in_range ? gt_q[train.reason] : '0;
    grp[train.core] = joined;
    for (int c = 0; c < NCORES; c++) begin
      int unsigned ci;
      ci    = c * GTTABLESIZE + (in_range ? 32'(train.reason) : 0);
      mb[c] = (c == int'(train.core)) ? nxt.base   : rpt_q[ci].base;
      ms[c] = (c == int'(train.core)) ? nxt.stride : rpt_q[ci].stride;
    end
    nmem = '0;
    for (int c = 0; c < NCORES; c++) begin
      sb[c] = '0;
      ss[c] = '0;
    end
    for (int c = 0; c < NCORES; c++) begin
      int unsigned rank;
      rank = 0;
      for (int m = 0; m < NCORES; m++)
        if (grp[m] && m != c && (mb[m] < mb[c] || (mb[m] == mb[c] && m < c))) rank++;
      if (grp[c]) begin
        sb[rank[POS_W-1:0]] = mb[c];
        ss[rank[POS_W-1:0]] = ms[c];
        nmem = nmem + 1'b1;
      end
    end
  end

  logic fire;
  assign fire = in_range && joined && (!train.hit || PREFETCHHITS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RPTSIZE; i++) rpt_q[i] <= '0;
      for (int g = 0; g < GTTABLESIZE; g++) gt_q[g] <= '0;
      for (int c = 0; c < NCORES; c++) begin
        ib_q[c] <= '0;
        is_q[c] <= '0;
      end
      icnt_q <= '0;
      ipos_q <= '0;
      ideg_q <= '0;
    end else if (train_ready) begin
      if (train_valid && in_range) begin
        rpt_q[ridx] <= nxt;
        gt_q[train.reason][train.core] <= joined;
        if (fire) begin
          for (int c = 0; c < NCORES; c++) begin
            ib_q[c] <= sb[c];
            is_q[c] <= ss[c];
          end
          icnt_q <= nmem;
          ipos_q <= '0;
          ideg_q <= DEG_W'(1);
        end
      end
    end else if (pf_ready) begin
      if (32'(ipos_q) + 1 >= 32'(icnt_q)) begin
        ipos_q <= '0;
        ideg_q <= (32'(ideg_q) >= DEGREE) ? '0 : ideg_q + 1'b1;
      end else begin
        ipos_q <= ipos_q + 1'b1;
      end
    end
  end

  a_pf_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && $stable(pf_addr));

endmodule
