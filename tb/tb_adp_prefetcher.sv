// tb_adp_prefetcher: self-checking test of the adaptive degree prefetcher.
//
// A procedural reference model keeps one stride entry per request reason and
// computes the expected prefetches, whose number grows with the confidence
// (one line at confidence 0, up to eight). Several reasons run strided
// streams of different, also negative, strides with occasional breaks and
// hits; reasons outside the table are ignored. Every prefetch address is
// compared in order, and with pf_ready high each must take one cycle.
module tb_adp_prefetcher;
  import slc_pkg::*;

  localparam int NR = 48, DIST = 1, MAXD = 8, WD = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic train_valid = 1'b0, train_ready, pf_valid, pf_ready = 1'b1;
  train_t train = '0;
  line_addr_t pf_addr;
  int checks = 0, failures = 0;

  adp_prefetcher dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  bit         m_v [NR];
  line_addr_t m_a [NR], m_s [NR];
  int         m_c [NR];
  line_addr_t exp_q [$];

  function automatic void model(line_addr_t a, int r, int core, bit hit);
    line_addr_t ns;
    if (r >= NR) return;
    if (!m_v[r]) begin
      m_v[r] = 1; m_a[r] = a; m_s[r] = 0; m_c[r] = 0;
      return;
    end
    ns = a - m_a[r];
    if (ns == m_s[r]) begin
      if (m_c[r] < 15) m_c[r]++;
    end else begin
      m_s[r] = ns; m_c[r] = 0;
    end
    m_a[r] = a;
    if (m_s[r] != 0 && !hit) begin
      int deg = (m_c[r] + 1 > MAXD) ? MAXD : m_c[r] + 1;
      for (int i = 1 + DIST; i <= DIST + deg; i++)
        exp_q.push_back(a + m_s[r] * line_addr_t'(i));
    end
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
    line_addr_t ptr [8];
    int         str [8];
    int         rsn [8];
    for (int e = 0; e < NR; e++) m_v[e] = 0;
    for (int k = 0; k < 8; k++) begin
      ptr[k] = line_addr_t'(100000 * (k + 1));
      str[k] = (k % 3 == 0) ? -(k + 1) : k + 1;
      rsn[k] = 5 * k + 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // directed: reason 7, stride 4
    access(1000, 7, 0, 0);   // records the address
    access(1004, 7, 0, 0);   // stride 4, confidence 0: 1012
    access(1008, 7, 0, 0);   // confidence 1: 1016 1020
    access(1012, 7, 0, 1);   // hit: trains only
    access(1016, 7, 0, 0);   // confidence 3: 4 lines
    access(1017, 7, 0, 0);   // new stride 1, confidence 0
    access(5000, 60, 0, 0);  // reason outside the table
    for (int n = 0; n < 4000; n++) begin
      int k;
      k = $urandom_range(7);
      if (n == 2000) check_rate = 0;
      if ($urandom_range(15) == 0) ptr[k] = line_addr_t'($urandom);
      else ptr[k] = ptr[k] + line_addr_t'(str[k]);
      access(ptr[k], rsn[k], $urandom_range(3), $urandom_range(4) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
