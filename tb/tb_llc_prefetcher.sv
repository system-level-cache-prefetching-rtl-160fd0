// tb_llc_prefetcher: self-checking test of the last-level collective
// prefetcher, at its default parameters.
//
// A procedural reference model keeps one stride entry per (core, reason), the
// group membership per reason, and predicts the group prefetch order: members
// sorted by base address, the degree as outer loop. Stimulus: four cores run
// strided streams for a few reasons, with stride breaks (which remove the
// entry) and hits. Every prefetch address is compared in order; groups of
// several members must occur.
module tb_llc_prefetcher;
  import slc_pkg::*;

  localparam int NC = 4, NR = 48, DEG = 2, WD = 600000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic train_valid = 1'b0, train_ready, pf_valid, pf_ready = 1'b1;
  train_t train = '0;
  line_addr_t pf_addr;
  int checks = 0, failures = 0;

  llc_prefetcher dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  bit         m_v [NC][NR], m_h [NC][NR], m_g [NC][NR];
  line_addr_t m_b [NC][NR], m_s [NC][NR];
  int         m_c [NC][NR];
  int         n_multi = 0;
  line_addr_t exp_q [$];

  function automatic void model(line_addr_t a, int r, int c, bit hit);
    int mem [$];
    if (r >= NR) return;
    if (!m_v[c][r] || (m_h[c][r] && a - m_b[c][r] != m_s[c][r])) begin
      m_v[c][r] = 1; m_h[c][r] = 0; m_s[c][r] = 0; m_c[c][r] = 0;
    end else if (!m_h[c][r]) begin
      m_h[c][r] = 1; m_s[c][r] = a - m_b[c][r]; m_c[c][r] = 0;
    end else if (m_c[c][r] < 15) m_c[c][r]++;
    m_b[c][r] = a;
    m_g[c][r] = m_h[c][r] && m_s[c][r] != 0 && m_c[c][r] > 0;
    if (!m_g[c][r] || hit) return;
    // members in ascending base order (insertion sort, ties by core)
    for (int m = 0; m < NC; m++)
      if (m_g[m][r]) begin
        int p = mem.size();
        while (p > 0 && m_b[mem[p-1]][r] > m_b[m][r]) p--;
        mem.insert(p, m);
      end
    if (mem.size() > 1) n_multi++;
    for (int d = 1; d <= DEG; d++)
      foreach (mem[i]) exp_q.push_back(m_b[mem[i]][r] + m_s[mem[i]][r] * line_addr_t'(d));
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

  task automatic access(line_addr_t a, int reason, int core, bit hit);
    int nexp;
    model(a, reason, core, hit);
    nexp = exp_q.size();
    train.addr = a; train.hit = hit; train.reason = reason_t'(reason); train.core = core_t'(core);
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
    line_addr_t sp [NC][3];
    int         ss [NC][3];
    int         rs [3] = '{2, 17, 40};
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++) begin m_v[c][r] = 0; m_g[c][r] = 0; end
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < 3; k++) begin
        sp[c][k] = line_addr_t'(50000 * (4 * k + c + 1));
        ss[c][k] = (k == 1) ? -(c + 2) : k + c + 1;
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      int c, k;
      c = $urandom_range(NC - 1);
      k = $urandom_range(2);
      if (n == 3500) check_rate = 0;
      if ($urandom_range(19) == 0) sp[c][k] = sp[c][k] + line_addr_t'($urandom_range(999));
      else sp[c][k] = sp[c][k] + line_addr_t'(ss[c][k]);
      access(sp[c][k], rs[k], c, $urandom_range(3) == 0);
    end
    checks++;
    if (n_multi == 0) begin failures++; $display("no group with several members fired"); end
    $display("groups with several members fired %0d times", n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
