// pf_queue: prefetch queue between the active prefetcher and the SLC.
//
// A first-in first-out buffer of DEPTH line addresses. The prefetcher side is
// never stalled: in_ready is always high and an address that arrives while the
// queue is full is dropped and counted, since a lost prefetch costs nothing but
// its benefit. The cache side pops the oldest address with a valid/ready
// handshake. A push and a pop may happen in the same cycle. The queue is the
// list of addresses the prefetch function hands back for fetching from DRAM;
// its depth and the drop-when-full rule are this design's choices.
module pf_queue
  import slc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,      // discard all entries (prefetcher switch)
  input  logic        in_valid,
  output logic        in_ready,
  input  line_addr_t  in_addr,
  output logic        out_valid,
  input  logic        out_ready,
  output line_addr_t  out_addr,
  output logic [31:0] dropped,    // addresses lost to a full queue
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned PTR_W = $clog2(DEPTH);

  line_addr_t         mem_q [DEPTH];
  logic [PTR_W-1:0]   rd_q, wr_q;
  logic [PTR_W:0]     cnt_q;
  logic               full, push, pop;

  assign full      = (32'(cnt_q) == DEPTH);
  assign in_ready  = 1'b1;
  assign out_valid = (cnt_q != '0);
  assign out_addr  = mem_q[rd_q];
  assign pop       = out_valid && out_ready;
  assign push      = in_valid && (!full || pop);
  assign level     = cnt_q;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
      rd_q    <= '0;
      wr_q    <= '0;
      cnt_q   <= '0;
      dropped <= '0;
    end else if (flush) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) begin
        mem_q[wr_q] <= in_addr;
        wr_q        <= inc(wr_q);
      end
      if (pop) rd_q <= inc(rd_q);
      if (in_valid && !push) dropped <= dropped + 1'b1;
      cnt_q <= cnt_q + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(cnt_q) <= DEPTH);

endmodule
