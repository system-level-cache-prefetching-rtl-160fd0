// tb_asdp_prefetcher: self-checking test of the adaptive stream detection
// prefetcher.
//
// A procedural reference model keeps its own stream filter, likelihood
// tables and epoch length, and predicts every prefetch address and every
// epoch length. Stimulus: interleaved up and down streams of random length
// (1 to 24 lines) mixed with isolated accesses. The epoch bounds and the
// similarity threshold are lowered so that short runs see epochs both halved
// and doubled; each of the two must happen. With pf_ready high each prefetch
// must take one cycle.
module tb_asdp_prefetcher;
  import slc_pkg::*;

  localparam int TS = 16, DEG = 2, LT = 80, EXT = 80, FS = 16;
  localparam int EMIN = 64, EMAX = 1024, STH = 3, WD = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic train_valid = 1'b0, train_ready, pf_valid, pf_ready = 1'b1;
  train_t train = '0;
  line_addr_t pf_addr;
  int checks = 0, failures = 0;
  logic [15:0] epoch_len;
  logic epoch_end, epoch_dissim;

  asdp_prefetcher #(.EPOCHMIN(EMIN), .EPOCHMAX(EMAX), .EPOCHSIMTHRESH(STH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  bit         m_v [TS], m_d [TS];
  line_addr_t m_a [TS];
  int         m_n [TS], m_l [TS];
  int         cur [2][FS+3], nxt [2][FS+3], prv [2][FS+3];  // index = length
  int         m_elen = EMIN, m_ecnt = 0;
  int         n_halve = 0, n_double = 0;
  line_addr_t exp_q [$];

  function automatic void model(line_addr_t a, bit hit);
    int f = -1, fr = -1, alen = 1, k = 0;
    bit fdown = 0, adown = 0, last;
    for (int e = 0; e < TS; e++) begin
      bit up = m_v[e] && (m_n[e] == 1 || !m_d[e]) && a == m_a[e] + 1;
      bit dn = m_v[e] && (m_n[e] == 1 || m_d[e]) && a == m_a[e] - 1;
      if (f < 0 && (up || dn)) begin f = e; fdown = !up; end
      if (fr < 0 && !m_v[e]) fr = e;
    end
    if (f >= 0) begin
      int ext = (m_n[f] >= FS / 2) ? EXT / 2 : EXT;
      m_a[f] = a; m_d[f] = fdown;
      if (m_n[f] < FS) m_n[f]++;
      m_l[f] = (m_l[f] + ext > 255) ? 255 : m_l[f] + ext;
      alen = m_n[f]; adown = m_d[f];
    end else if (fr >= 0) begin
      m_v[fr] = 1; m_a[fr] = a; m_n[fr] = 1; m_d[fr] = 0; m_l[fr] = LT;
    end
    // prefetch decision on the tables as they were
    for (int kk = 1; kk <= DEG; kk++)
      if (cur[adown][alen] < 2 * ((alen + kk <= FS) ? cur[adown][alen + kk] : 0)) k = kk;
    for (int i = 1; i <= k; i++)
      exp_q.push_back(adown ? a - line_addr_t'(i) : a + line_addr_t'(i));
    // evictions
    last = (m_ecnt + 1 >= m_elen);
    for (int e = 0; e < TS; e++)
      if (m_v[e]) begin
        m_l[e]--;
        if (m_l[e] == 0 || last) begin
          for (int j = 1; j <= m_n[e]; j++) begin
            nxt[m_d[e]][j]++;
            if (cur[m_d[e]][j] > 0) cur[m_d[e]][j]--;
          end
          m_v[e] = 0;
        end
      end
    if (last) begin
      int sim = 0;
      for (int d = 0; d < 2; d++)
        for (int j = 1; j <= FS; j++) begin
          sim += (nxt[d][j] > prv[d][j]) ? nxt[d][j] - prv[d][j] : prv[d][j] - nxt[d][j];
          cur[d][j] = nxt[d][j]; prv[d][j] = nxt[d][j]; nxt[d][j] = 0;
        end
      if (sim > STH * 2 * FS) begin
        m_elen = (m_elen / 2 < EMIN) ? EMIN : m_elen / 2; n_halve++;
      end else begin
        m_elen = (m_elen * 2 > EMAX) ? EMAX : m_elen * 2; n_double++;
      end
      m_ecnt = 0;
    end else m_ecnt++;
  endfunction

  // ---------------- driver ----------------
  line_addr_t got_q [$];
  int pf_cycles, busy_cycles;
  bit check_rate = 1;

  // inputs change and outputs are sampled at the falling edge
  always @(negedge clk) begin
    if (!check_rate) pf_ready = ($urandom_range(3) != 0);
    #1;
    if (rst_n && pf_valid && pf_ready) got_q.push_back(pf_addr);
  end

  task automatic access(line_addr_t a, bit hit);
    int nexp;
    model(a, hit);
    nexp = exp_q.size();
    train.addr = a; train.hit = hit; train.reason = '0; train.core = '0;
    @(negedge clk);
    while (!train_ready) @(negedge clk);
    train_valid = 1'b1;
    @(negedge clk);
    train_valid = 1'b0;
    #2;
    busy_cycles = 0;
    while (!train_ready) begin @(negedge clk); #2 busy_cycles++; end
    checks++;
    if (got_q.size() != nexp) begin
      failures++;
      $display("addr %0d: %0d prefetches, expected %0d", a, got_q.size(), nexp);
    end
    if (check_rate) begin
      checks++;
      if (busy_cycles != nexp) begin
        failures++;
        $display("addr %0d: %0d busy cycles for %0d prefetches", a, busy_cycles, nexp);
      end
    end
    while (got_q.size() > 0 && exp_q.size() > 0) begin
      line_addr_t g = got_q.pop_front(), x = exp_q.pop_front();
      checks++;
      if (g !== x) begin
        failures++;
        $display("addr %0d: prefetch %0d, expected %0d", a, g, x);
      end
    end
    got_q.delete(); exp_q.delete();
  endtask



  initial begin
    line_addr_t sp [4];
    int         sl [4];
    bit         sd [4];
    for (int e = 0; e < TS; e++) m_v[e] = 0;
    for (int d = 0; d < 2; d++)
      for (int j = 0; j < FS + 3; j++) begin cur[d][j] = 0; nxt[d][j] = 0; prv[d][j] = 0; end
    for (int s = 0; s < 4; s++) begin sp[s] = line_addr_t'($urandom); sl[s] = 0; sd[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 6000; n++) begin
      int s;
      s = $urandom_range(4);
      if (n == 4000) check_rate = 0;
      if (s == 4) access(line_addr_t'($urandom), $urandom_range(1));
      else begin
        if (sl[s] == 0) begin
          // phases alternate between short and long streams
          sl[s] = ((n / 700) % 2) ? $urandom_range(24, 8) : $urandom_range(3, 1);
          sd[s] = $urandom_range(1);
          sp[s] = line_addr_t'($urandom);
        end
        sp[s] = sd[s] ? sp[s] - 1 : sp[s] + 1;
        sl[s]--;
        access(sp[s], $urandom_range(1));
      end
      checks++;
      if (32'(epoch_len) != m_elen) begin
        failures++;
        $display("access %0d: epoch length %0d, expected %0d", n, epoch_len, m_elen);
      end
    end
    checks += 2;
    if (n_halve == 0) begin failures++; $display("no epoch was halved"); end
    if (n_double == 0) begin failures++; $display("no epoch was doubled"); end
    $display("epochs halved %0d, doubled %0d", n_halve, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
