// adp_prefetcher: Adaptive Degree Prefetcher (ADP).
//
// A stride table with one entry per request reason (TABLESIZE = 48 reasons)
// learns a free stride for each reason. The first access of a reason records
// its address with stride zero; the next access stores the difference to the
// recorded address as the stride; each later access that repeats the stride
// raises the confidence by one, and one that breaks it stores the new stride
// and clears the confidence. The confidence also sets the degree: an entry at
// CONFTHRESH prefetches one line, and every further step of confidence one
// more, up to MAXDEGREE lines, at address + i*stride for
// i = 1+DISTANCE .. DISTANCE+degree.
//
// The table entry is updated in the cycle of the train handshake; prefetches
// leave one per cycle on the pf valid/ready port and train_ready is low until
// the last one is accepted. The per-reason table, stride learning, DISTANCE and
// CONFTHRESH follow the published ADP. The linear confidence-to-degree map,
// MAXDEGREE = 8, prefetching on misses only (PREFETCHHITS = 0) and issuing
// nothing for a zero stride are this design's choices.
module adp_prefetcher
  import slc_pkg::*;
#(
  parameter int unsigned TABLESIZE    = N_REASONS,
  parameter int unsigned DISTANCE     = 1,
  parameter int unsigned CONFTHRESH   = 0,
  parameter int unsigned MAXDEGREE    = 8,
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

  localparam int unsigned CONF_W = 4;
  localparam int unsigned DEG_W  = $clog2(MAXDEGREE + 1);
  localparam logic [CONF_W-1:0] CONF_MAX = '1;

  typedef struct packed {
    logic              valid;
    line_addr_t        addr;
    line_addr_t        stride;   // two's complement, in lines
    logic [CONF_W-1:0] conf;
  } spe_t;

  spe_t spt_q [TABLESIZE];

  // issue state
  line_addr_t       base_q, stride_q;
  logic [DEG_W-1:0] left_q;       // prefetches still to issue
  logic [DEG_W-1:0] step_q;       // multiplier of the next prefetch

  assign train_ready = (left_q == '0);
  assign pf_valid    = (left_q != '0);
  assign pf_addr     = base_q + stride_q * line_addr_t'(step_q);

  // entry update
  logic       in_range;
  spe_t       cur, nxt;
  line_addr_t new_stride;
  int unsigned degree;

  assign in_range = 32'(train.reason) < TABLESIZE;

  always_comb begin
    cur        = in_range ? spt_q[train.reason] : '0;
    nxt        = cur;
    new_stride = train.addr - cur.addr;
    if (!cur.valid) begin
      nxt.valid  = 1'b1;
      nxt.stride = '0;
      nxt.conf   = '0;
    end else if (new_stride == cur.stride) begin
      nxt.conf   = (cur.conf == CONF_MAX) ? cur.conf : cur.conf + 1'b1;
    end else begin
      nxt.stride = new_stride;
      nxt.conf   = '0;
    end
    nxt.addr = train.addr;

    degree = 0;
    if (cur.valid && nxt.stride != '0 && 32'(nxt.conf) >= CONFTHRESH &&
        (!train.hit || PREFETCHHITS)) begin
      degree = 32'(nxt.conf) - CONFTHRESH + 1;
      if (degree > MAXDEGREE) degree = MAXDEGREE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < TABLESIZE; e++) spt_q[e] <= '0;
      base_q   <= '0;
      stride_q <= '0;
      left_q   <= '0;
      step_q   <= '0;
    end else if (train_ready) begin
      if (train_valid && in_range) begin
        spt_q[train.reason] <= nxt;
        base_q   <= train.addr;
        stride_q <= nxt.stride;
        left_q   <= DEG_W'(degree);
        step_q   <= DEG_W'(DISTANCE + 1);
      end
    end else if (pf_ready) begin
      left_q <= left_q - 1'b1;
      step_q <= step_q + 1'b1;
    end
  end

  a_pf_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && $stable(pf_addr));

endmodule
