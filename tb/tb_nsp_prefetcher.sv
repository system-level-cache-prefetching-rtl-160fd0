// tb_nsp_prefetcher: self-checking test of the naive stride prefetcher.
//
// A reference model written as plain procedural code keeps its own stride
// table and computes the prefetch addresses each access must produce. The
// test runs directed cases (new chain, upward and downward chains, hits that
// train without prefetching, a full table) and then a long random mix of
// interleaved strided chains and jumps, and compares every prefetch address in
// order. With pf_ready held high, each prefetch must take exactly one cycle.
module tb_nsp_prefetcher;
  import slc_pkg::*;

  localparam int TS = 8, DEG = 3, LT = 80, EXT = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic train_valid = 1'b0, train_ready, pf_valid, pf_ready = 1'b1;
  train_t train = '0;
  line_addr_t pf_addr;
  int checks = 0, failures = 0;

  nsp_prefetcher dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  bit         m_v [TS];
  line_addr_t m_a [TS];
  int         m_c [TS], m_l [TS];
  bit         m_rp [TS], m_pos [TS];
  line_addr_t exp_q [$];

  function automatic void model(line_addr_t a, bit hit);
    int f = -1, fr = -1;
    for (int e = 0; e < TS; e++) begin
      if (f < 0 && m_v[e] && (m_a[e] == a - 1 || m_a[e] == a + 1)) f = e;
      if (fr < 0 && !m_v[e]) fr = e;
    end
    if (f >= 0) begin
      m_pos[f] = (m_a[f] == a - 1);
      m_a[f] = a;
      if (m_c[f] < 15) m_c[f]++;
      m_l[f] = (m_l[f] + EXT > 255) ? 255 : m_l[f] + EXT;
      m_rp[f] = 0;
    end else if (fr >= 0) begin
      m_v[fr] = 1; m_a[fr] = a; m_c[fr] = 0; m_l[fr] = LT; m_rp[fr] = 0; m_pos[fr] = 1;
    end
    for (int e = 0; e < TS; e++)
      if (m_v[e]) begin
        m_l[e]--;
        if (m_l[e] == 0) m_v[e] = 0;
      end
    if (!hit)
      for (int e = 0; e < TS; e++)
        if (m_v[e] && !m_rp[e]) begin
          for (int i = 1; i <= DEG; i++)
            exp_q.push_back(m_pos[e] ? m_a[e] + line_addr_t'(i) : m_a[e] - line_addr_t'(i));
          m_rp[e] = 1;
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
    for (int e = 0; e < TS; e++) begin m_v[e] = 0; m_rp[e] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // directed: new chain, its continuation, a hit, a downward chain
    access(100, 0);          // 101 102 103
    access(101, 0);          // 102 103 104
    access(500, 1);          // trains, no prefetch
    access(900, 0);          // 501.. and 901..
    access(899, 0);          // 898 897 896
    // fill the table, then a miss that finds no room
    for (int k = 0; k < 10; k++) access(line_addr_t'(10000 + 1000 * k), 0);
    // random mix of chains and jumps
    for (int n = 0; n < 3000; n++) begin
      line_addr_t a;
      int r;
      r = $urandom_range(9);
      if (n == 1500) check_rate = 0;
      if (r < 6) a = line_addr_t'(20000 + 64 * $urandom_range(5)) + line_addr_t'(n % 16);
      else if (r < 8) a = line_addr_t'(30000 + 64 * $urandom_range(3)) - line_addr_t'(n % 16);
      else a = line_addr_t'($urandom_range(1 << 20));
      access(a, $urandom_range(3) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
