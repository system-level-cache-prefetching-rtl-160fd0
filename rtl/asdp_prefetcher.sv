// asdp_prefetcher: Adaptive Stream Detection Prefetcher (ASDP).
//
// A stream filter of TABLESIZE entries follows streams of consecutive lines.
// Each entry holds the stream's last line, its length (saturating at FS, the
// longest length tracked), its direction and a lifetime counted in read
// accesses. An access one line after (or, for a downward stream, before) an
// entry's last line extends that stream: length + 1, lifetime + extension.
// The extension is LIFETIMEEXT for streams shorter than FS/2 and half of it
// for longer ones, which favours short streams (length-based stream
// detection). Any other access starts a new stream of length 1 with lifetime
// LIFETIME in a free entry. Every access decrements all lifetimes; a stream
// whose lifetime ends is evicted.
//
// Stream length histograms: for each direction and each length i = 1..FS,
// lht(i) counts the finished streams of length i or longer. An evicted stream
// of length k adds one to LHT_next(i) and takes one from LHT_curr(i) for every
// i <= k. An epoch ends after epoch_len accesses: all streams are evicted,
// LHT_next becomes LHT_curr and is cleared. The similarity score, the mean
// absolute difference between the finished epoch's table and the previous
// one, adapts the epoch length: above EPOCHSIMTHRESH the tables are
// dissimilar and the epoch is halved (not below EPOCHMIN), otherwise it is
// doubled (not above EPOCHMAX).
//
// Prefetch decision for an access that leaves its stream at length i, on a
// miss or (PREFETCHHITS) a hit: the largest k <= DEGREE with
// LHT_curr(i) < 2*LHT_curr(i+k) gives k prefetches of the next lines in the
// stream's direction, starting 1+DISTANCE lines ahead.
//
// Timing: the filter, histograms and epoch are updated in the cycle of the
// train handshake; prefetches leave one per cycle on the pf valid/ready port
// while train_ready is low. The filter, histograms, inequality, adaptive
// epoch, length-based lifetime and variable-length prefetch follow Adaptive
// Stream Detection with its feedback extensions as used in the ASDP; FS = 16,
// the halving rule for the lifetime extension, the halve/double epoch rule,
// the first epoch length (EPOCHMIN), upward direction for a stream of length
// 1, and 16-bit saturating histogram counters are this design's choices.
module asdp_prefetcher
  import slc_pkg::*;
#(
  parameter int unsigned TABLESIZE      = 16,
  parameter int unsigned DEGREE         = 2,
  parameter int unsigned DISTANCE       = 0,
  parameter int unsigned EPOCHSIMTHRESH = 100,
  parameter int unsigned EPOCHMIN       = 256,
  parameter int unsigned EPOCHMAX       = 8000,
  parameter int unsigned LIFETIME       = 80,
  parameter int unsigned LIFETIMEEXT    = 80,
  parameter bit          PREFETCHHITS   = 1'b1,
  parameter int unsigned FS             = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        train_valid,
  output logic        train_ready,
  input  train_t      train,
  output logic        pf_valid,
  input  logic        pf_ready,
  output line_addr_t  pf_addr,
  // observation of the adaptive epoch
  output logic [15:0] epoch_len,
  output logic        epoch_end,     // pulse: an epoch ended on this handshake
  output logic        epoch_dissim   // with epoch_end: the tables were dissimilar
);

  localparam int unsigned LT_W  = 8;
  localparam int unsigned LEN_W = $clog2(FS + 1);
  localparam int unsigned IDX_W = $clog2(TABLESIZE);
  localparam int unsigned H_W   = 16;
  localparam int unsigned DEG_W = $clog2(DEGREE + 1);
  localparam logic [LT_W-1:0] LT_MAX = '1;

  typedef struct packed {
    logic             valid;
    line_addr_t       last;
    logic [LEN_W-1:0] len;
    logic             down;
    logic [LT_W-1:0]  life;
  } stream_t;

  typedef logic [H_W-1:0] hist_t [2][FS];

  stream_t sf_q [TABLESIZE];
  hist_t   lht_curr_q, lht_next_q, lht_prev_q;
  logic [15:0] epoch_len_q, epoch_cnt_q;

  // issue state
  line_addr_t       base_q;
  logic             down_q;
  logic [DEG_W-1:0] left_q, step_q;

  assign train_ready = (left_q == '0);
  assign pf_valid    = (left_q != '0);
  assign pf_addr     = down_q ? base_q - line_addr_t'(step_q) : base_q + line_addr_t'(step_q);
  assign epoch_len   = epoch_len_q;

  // ---------------- stream filter search ----------------
  logic             found, free_found;
  logic [IDX_W-1:0] match_idx, free_idx;
  logic             match_down;

  always_comb begin
    found      = 1'b0;
    free_found = 1'b0;
    match_idx  = '0;
    free_idx   = '0;
    match_down = 1'b0;
    for (int e = 0; e < TABLESIZE; e++) begin
      logic up_ok, dn_ok;
      up_ok = sf_q[e].valid && (sf_q[e].len == LEN_W'(1) || !sf_q[e].down) &&
              (train.addr == sf_q[e].last + 1'b1);
      dn_ok = sf_q[e].valid && (sf_q[e].len == LEN_W'(1) || sf_q[e].down) &&
              (train.addr == sf_q[e].last - 1'b1);
      if (!found && (up_ok || dn_ok)) begin
        found      = 1'b1;
        match_idx  = IDX_W'(e);
        match_down = !up_ok;
      end
      if (!free_found && !sf_q[e].valid) begin
        free_found = 1'b1;
        free_idx   = IDX_W'(e);
      end
    end
  end

  // ---------------- filter update and evictions ----------------
  stream_t sf_upd [TABLESIZE];
  logic [TABLESIZE-1:0] evict;
  logic             last_access;     // this access ends the epoch
  logic [LEN_W-1:0] acc_len;         // length of the accessed stream after update
  logic             acc_down;

  assign last_access = (epoch_cnt_q + 1'b1 >= epoch_len_q);

  logic [LT_W-1:0] ext;

  always_comb begin
    acc_len  = LEN_W'(1);
    acc_down = 1'b0;
    ext      = '0;
    evict    = '0;
    sf_upd   = sf_q;
    for (int e = 0; e < TABLESIZE; e++) begin
      stream_t s;
      s = sf_q[e];
      if (found && IDX_W'(e) == match_idx) begin
        ext      = (32'(s.len) >= FS / 2) ? LT_W'(LIFETIMEEXT / 2) : LT_W'(LIFETIMEEXT);
        s.last   = train.addr;
        s.down   = match_down;
        s.len    = (32'(s.len) >= FS) ? s.len : s.len + 1'b1;
        s.life   = (s.life > LT_MAX - ext) ? LT_MAX : s.life + ext;
        acc_len  = s.len;
        acc_down = s.down;
      end else if (!found && free_found && IDX_W'(e) == free_idx) begin
        s.valid = 1'b1;
        s.last  = train.addr;
        s.len   = LEN_W'(1);
        s.down  = 1'b0;
        s.life  = LT_W'(LIFETIME);
      end
      if (s.valid) begin
        s.life = s.life - 1'b1;
        if (s.life == '0 || last_access) evict[e] = 1'b1;
      end
      sf_upd[e] = s;
    end
  end

  // ---------------- histogram update ----------------
  hist_t lht_curr_n, lht_next_n;
  logic [H_W+8-1:0] sim_sum;
  logic dissim;

  always_comb begin
    sim_sum = '0;
    for (int d = 0; d < 2; d++) begin
      for (int j = 0; j < FS; j++) begin
        logic [H_W:0] cnt, nx;
        cnt = '0;
        for (int e = 0; e < TABLESIZE; e++)
          if (evict[e] && int'(sf_upd[e].down) == d && 32'(sf_upd[e].len) >= j + 1)
            cnt = cnt + 1'b1;
        nx = {1'b0, lht_next_q[d][j]} + cnt;
        lht_next_n[d][j] = nx[H_W] ? '1 : nx[H_W-1:0];
        lht_curr_n[d][j] = ({1'b0, lht_curr_q[d][j]} > cnt) ? lht_curr_q[d][j] - H_W'(cnt) : '0;
        sim_sum = sim_sum + ((lht_next_n[d][j] > lht_prev_q[d][j])
                             ? 24'(lht_next_n[d][j] - lht_prev_q[d][j])
                             : 24'(lht_prev_q[d][j] - lht_next_n[d][j]));
      end
    end
    dissim = (32'(sim_sum) > EPOCHSIMTHRESH * 2 * FS);
  end

  // ---------------- prefetch decision ----------------
  function automatic logic [H_W-1:0] lht_at(input logic dn, input int unsigned i);
    // lht value for length i (1-based); 0 beyond the tracked range
    if (i >= 1 && i <= FS) return lht_curr_q[dn][i-1];
    return '0;
  endfunction

  logic [DEG_W-1:0] k_sel;
  always_comb begin
    k_sel = '0;
    if (!train.hit || PREFETCHHITS) begin
      for (int k = 1; k <= DEGREE; k++)
        if ({1'b0, lht_at(acc_down, 32'(acc_len))} < {lht_at(acc_down, 32'(acc_len) + 32'(k)), 1'b0})
          k_sel = DEG_W'(k);
    end
  end

  assign epoch_end    = train_valid && train_ready && last_access;
  assign epoch_dissim = epoch_end && dissim;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < TABLESIZE; e++) sf_q[e] <= '0;
      for (int d = 0; d < 2; d++)
        for (int j = 0; j < FS; j++) begin
          lht_curr_q[d][j] <= '0;
          lht_next_q[d][j] <= '0;
          lht_prev_q[d][j] <= '0;
        end
      epoch_len_q <= 16'(EPOCHMIN);
      epoch_cnt_q <= '0;
      base_q      <= '0;
      down_q      <= 1'b0;
      left_q      <= '0;
      step_q      <= '0;
    end else if (train_ready) begin
      if (train_valid) begin
        for (int e = 0; e < TABLESIZE; e++) begin
          sf_q[e] <= sf_upd[e];
          if (evict[e]) sf_q[e].valid <= 1'b0;
        end
        if (last_access) begin
          epoch_cnt_q <= '0;
          lht_curr_q  <= lht_next_n;
          lht_prev_q  <= lht_next_n;
          for (int d = 0; d < 2; d++)
            for (int j = 0; j < FS; j++) lht_next_q[d][j] <= '0;
          if (dissim)
            epoch_len_q <= (32'(epoch_len_q) / 2 < EPOCHMIN) ? 16'(EPOCHMIN) : epoch_len_q >> 1;
          else
            epoch_len_q <= (32'(epoch_len_q) * 2 > EPOCHMAX) ? 16'(EPOCHMAX) : epoch_len_q << 1;
        end else begin
          epoch_cnt_q <= epoch_cnt_q + 1'b1;
          lht_curr_q  <= lht_curr_n;
          lht_next_q  <= lht_next_n;
        end
        base_q <= train.addr;
        down_q <= acc_down;
        left_q <= k_sel;
        step_q <= DEG_W'(DISTANCE + 1);
      end
    end else if (pf_ready) begin
      left_q <= left_q - 1'b1;
      step_q <= step_q + 1'b1;
    end
  end

  a_pf_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready |=> pf_valid && $stable(pf_addr));

endmodule
