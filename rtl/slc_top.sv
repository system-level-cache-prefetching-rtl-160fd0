// slc_top: system level cache with a run-time selectable prefetcher.
//
// The SLC (slc_cache) serves whole-line requests from the GPU's L2 slices and
// fetches from DRAM. Every cacheable demand read is reported to the selected
// prefetcher, which turns the observed access stream into prefetch line
// addresses. They pass through the prefetch queue (pf_queue) to the cache,
// which fetches those not already resident or in flight.
//
// Five prefetchers are built in and pf_sel chooses one while running:
//   PF_NONE  no prefetching (the plain SLC)
//   PF_NSP   naive stride prefetcher        (nsp_prefetcher)
//   PF_ADP   adaptive degree prefetcher     (adp_prefetcher)
//   PF_ASDP  adaptive stream detection      (asdp_prefetcher)
//   PF_MBOP  modified best-offset           (mbop_prefetcher)
//   PF_LLC   last-level collective          (llc_prefetcher)
// Only the selected prefetcher is trained and only its addresses enter the
// queue. A change of pf_sel flushes the queue; a prefetcher that is
// deselected while issuing finishes into nothing. Each prefetcher keeps its
// tables across a switch. The set of prefetchers and their default parameters
// follow the design; selecting them at run time through one port, and the
// flush on a switch, are this design's choices.
//
// Interfaces are those of slc_cache (valid/ready on every channel, DRAM reads
// tagged by fill slot), plus the statistics and the state of the adaptive
// prefetchers for observation.
module slc_top
  import slc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  pf_sel_e           pf_sel,
  // demand requests from the L2 slices
  input  logic              req_valid,
  output logic              req_ready,
  input  slc_req_t          req,
  input  line_data_t        req_wdata,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output slc_rsp_t          rsp,
  output line_data_t        rsp_rdata,
  // external memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output mem_req_t          mem_req,
  output line_data_t        mem_wdata,
  input  logic              mem_rsp_valid,
  output logic              mem_rsp_ready,
  input  logic [MSHR_W-1:0] mem_rsp_tag,
  input  line_data_t        mem_rsp_rdata,
  // observation
  output slc_stats_t        stats,
  output logic [31:0]       pf_generated,   // addresses produced by the prefetcher
  output logic [31:0]       pfq_dropped,    // addresses lost to a full queue
  output logic [4:0]        pfq_level,      // addresses waiting in the queue
  output logic [15:0]       asdp_epoch_len,
  output logic              asdp_epoch_end,
  output logic              asdp_epoch_dissim,
  output logic              mbop_offset_valid,
  output logic signed [7:0] mbop_offset
);

  localparam int unsigned NPF = 5;   // prefetchers, index = pf_sel - 1

  // ---------------- cache ----------------
  logic       train_valid, train_ready;
  train_t     train;
  logic       pfq_valid, pfq_ready;
  line_addr_t pfq_addr;

  slc_cache u_cache (
    .clk, .rst_n,
    .req_valid, .req_ready, .req, .req_wdata,
    .rsp_valid, .rsp_ready, .rsp, .rsp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_wdata,
    .mem_rsp_valid, .mem_rsp_ready, .mem_rsp_tag, .mem_rsp_rdata,
    .train_valid, .train_ready, .train,
    .pfq_valid, .pfq_ready, .pfq_addr,
    .stats
  );

  // ---------------- prefetchers ----------------
  logic [NPF-1:0] t_valid, t_ready, p_valid, p_ready;
  line_addr_t     p_addr [NPF];
  logic [NPF-1:0] sel_oh;

  always_comb begin
    sel_oh = '0;
    if (pf_sel != PF_NONE && 32'(pf_sel) <= NPF) sel_oh[32'(pf_sel) - 1] = 1'b1;
  end

  assign t_valid = sel_oh & {NPF{train_valid}};
  assign p_ready = '1;   // the queue never stalls; a deselected prefetcher drains

  nsp_prefetcher u_nsp (
    .clk, .rst_n, .train,
    .train_valid(t_valid[0]), .train_ready(t_ready[0]),
    .pf_valid(p_valid[0]), .pf_ready(p_ready[0]), .pf_addr(p_addr[0])
  );

  adp_prefetcher u_adp (
    .clk, .rst_n, .train,
    .train_valid(t_valid[1]), .train_ready(t_ready[1]),
    .pf_valid(p_valid[1]), .pf_ready(p_ready[1]), .pf_addr(p_addr[1])
  );

  asdp_prefetcher u_asdp (
    .clk, .rst_n, .train,
    .train_valid(t_valid[2]), .train_ready(t_ready[2]),
    .pf_valid(p_valid[2]), .pf_ready(p_ready[2]), .pf_addr(p_addr[2]),
    .epoch_len(asdp_epoch_len), .epoch_end(asdp_epoch_end), .epoch_dissim(asdp_epoch_dissim)
  );

  mbop_prefetcher u_mbop (
    .clk, .rst_n, .train,
    .train_valid(t_valid[3]), .train_ready(t_ready[3]),
    .pf_valid(p_valid[3]), .pf_ready(p_ready[3]), .pf_addr(p_addr[3]),
    .offset_valid(mbop_offset_valid), .best_offset(mbop_offset)
  );

  llc_prefetcher u_llc (
    .clk, .rst_n, .train,
    .train_valid(t_valid[4]), .train_ready(t_ready[4]),
    .pf_valid(p_valid[4]), .pf_ready(p_ready[4]), .pf_addr(p_addr[4])
  );

  // selected prefetcher towards cache and queue
  logic       sel_pf_valid;
  line_addr_t sel_pf_addr;
  always_comb begin
    train_ready  = 1'b1;
    sel_pf_valid = 1'b0;
    sel_pf_addr  = '0;
    for (int i = 0; i < NPF; i++)
      if (sel_oh[i]) begin
        train_ready  = t_ready[i];
        sel_pf_valid = p_valid[i];
        sel_pf_addr  = p_addr[i];
      end
  end

  // ---------------- prefetch queue ----------------
  pf_sel_e    sel_q;
  logic       q_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q        <= PF_NONE;
      pf_generated <= '0;
    end else begin
      sel_q <= pf_sel;
      if (sel_pf_valid) pf_generated <= pf_generated + 1;
    end
  end

  pf_queue #(.DEPTH(16)) u_pfq (
    .clk, .rst_n,
    .flush    (sel_q != pf_sel),
    .in_valid (sel_pf_valid),
    .in_ready (q_in_ready),
    .in_addr  (sel_pf_addr),
    .out_valid(pfq_valid),
    .out_ready(pfq_ready),
    .out_addr (pfq_addr),
    .dropped  (pfq_dropped),
    .level    (pfq_level)
  );

  a_queue_open: assert property (@(posedge clk) disable iff (!rst_n) q_in_ready);

endmodule
