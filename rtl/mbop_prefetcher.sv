// mbop_prefetcher: Modified Best-Offset Prefetcher (MBOP).
//
// A recent-requests (RR) table keeps the last NRRECENT read line addresses.
// For every trained access A, the distance from A to each of them is an
// offset candidate: every distance d with 1 <= |d| <= MAXOFFSET adds one to the
// score of offset d, so all offsets are trained at once rather than one offset
// per round. After EPOCHLENGTH accesses the offset with the highest score is
// chosen; if its score reached SCORETHRESH, it is the prefetch offset for the
// whole next epoch, otherwise prefetching is off for that epoch. All scores
// are then cleared. On a miss (or any access with PREFETCHHITS) while an
// offset is active, the prefetcher requests A + i*offset for i = 1..DEGREE.
//
// Timing: scores, RR table and epoch are updated in the cycle of the train
// handshake, including the choice of offset at the end of an epoch; the
// prefetches leave one per cycle on the pf valid/ready port while train_ready
// is low. The RR table, all-offset scoring, epoch, threshold and the default
// parameters follow the MBOP. Candidate offsets of both signs, the choice of
// the lowest-numbered offset on a tie (negative offsets first), training on
// every read access and 16-bit saturating scores are this design's choices.
module mbop_prefetcher
  import slc_pkg::*;
#(
  parameter int unsigned DEGREE       = 1,
  parameter int unsigned SCORETHRESH  = 50,
  parameter int unsigned EPOCHLENGTH  = 300,
  parameter int unsigned MAXOFFSET    = 32,
  parameter int unsigned NRRECENT     = 16,
  parameter bit          PREFETCHHITS = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              train_valid,
  output logic              train_ready,
  input  train_t            train,
  output logic              pf_valid,
  input  logic              pf_ready,
  output line_addr_t        pf_addr,
  // observation of the offset choice
  output logic              offset_valid,   // an offset is active this epoch
  output logic signed [7:0] best_offset
);

  localparam int unsigned NOFF  = 2 * MAXOFFSET;
  localparam int unsigned SC_W  = 16;
  localparam int unsigned DEG_W = $clog2(DEGREE + 1);
  localparam int unsigned EC_W  = $clog2(EPOCHLENGTH + 1);

  line_addr_t            rr_q    [NRRECENT];
  logic [NRRECENT-1:0]   rr_v_q;
  logic [SC_W-1:0]       score_q [NOFF];
  logic [EC_W-1:0]       epoch_q;
  logic                  off_v_q;
  logic signed [7:0]     off_q;

  // issue state
  line_addr_t       base_q;
  line_addr_t       stride_q;
  logic [DEG_W-1:0] left_q, step_q;

  assign train_ready  = (left_q == '0);
  assign pf_valid     = (left_q != '0);
  assign pf_addr      = base_q + stride_q * line_addr_t'(step_q);
  assign offset_valid = off_v_q;
  assign best_offset  = off_q;

  // offset index: -MAXOFFSET..-1 -> 0..MAXOFFSET-1, 1..MAXOFFSET -> MAXOFFSET..NOFF-1
  function automatic int idx_to_off(input int unsigned i);
    return (i < MAXOFFSET) ? int'(i) - int'(MAXOFFSET) : int'(i) - int'(MAXOFFSET) + 1;
  endfunction

  // ---------------- scoring ----------------
  logic [SC_W-1:0] score_n [NOFF];
  always_comb begin
    logic signed [LA_W-1:0] diff [NRRECENT];
    for (int j = 0; j < NRRECENT; j++) diff[j] = $signed(train.addr - rr_q[j]);
    for (int i = 0; i < NOFF; i++) begin
      logic [SC_W:0] s;
      s = {1'b0, score_q[i]};
      for (int j = 0; j < NRRECENT; j++)
        if (rr_v_q[j] && diff[j] == LA_W'(idx_to_off(i))) s = s + 1'b1;
      score_n[i] = s[SC_W] ? '1 : s[SC_W-1:0];
    end
  end

  // ---------------- best offset at the end of an epoch ----------------
  logic [SC_W-1:0] best_sc;
  int unsigned     best_i;
  always_comb begin
    best_sc = '0;
    best_i  = 0;
    for (int i = 0; i < NOFF; i++)
      if (score_n[i] > best_sc) begin
        best_sc = score_n[i];
        best_i  = i;
      end
  end

  logic last_access;
  assign last_access = (32'(epoch_q) + 1 >= EPOCHLENGTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NRRECENT; j++) rr_q[j] <= '0;
      for (int i = 0; i < NOFF; i++) score_q[i] <= '0;
      rr_v_q   <= '0;
      epoch_q  <= '0;
      off_v_q  <= 1'b0;
      off_q    <= '0;
      base_q   <= '0;
      stride_q <= '0;
      left_q   <= '0;
      step_q   <= '0;
    end else if (train_ready) begin
      if (train_valid) begin
        rr_q[0] <= train.addr;
        for (int j = 1; j < NRRECENT; j++) rr_q[j] <= rr_q[j-1];
        rr_v_q  <= {rr_v_q[NRRECENT-2:0], 1'b1};
        if (last_access) begin
          epoch_q <= '0;
          for (int i = 0; i < NOFF; i++) score_q[i] <= '0;
          off_v_q <= (32'(best_sc) >= SCORETHRESH);
          off_q   <= 8'(idx_to_off(best_i));
        end else begin
          epoch_q <= epoch_q + 1'b1;
          for (int i = 0; i < NOFF; i++) score_q[i] <= score_n[i];
        end
        base_q   <= train.addr;
        stride_q <= line_addr_t'(signed'(off_q));
        step_q   <= DEG_W'(1);
        left_q   <= (off_v_q && (!train.hit || PREFETCHHITS)) ? DEG_W'(DEGREE) : '0;
      end
    end else if (pf_ready) begin
      left_q <= left_q - 1'b1;
      step_q <= step_q + 1'b1;
    end
  end

  a_pf_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && $stable(pf_addr));

endmodule
