// tb_mbop_prefetcher: self-checking test of the modified best-offset
// prefetcher, at its default parameters.
//
// A procedural reference model keeps the recent-requests list and a score per
// offset, picks the best offset at the end of each 300-access epoch and
// predicts each prefetch. The stimulus runs in phases: interleaved streams
// with a common stride (positive or negative), then random addresses, so that
// the offset is switched on, changed and switched off. The prefetch addresses
// and the chosen offset are compared after every access; both states of the
// offset must be seen.
module tb_mbop_prefetcher;
  import slc_pkg::*;

  localparam int NRR = 16, MAXO = 32, ELEN = 300, STH = 50, WD = 600000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic train_valid = 1'b0, train_ready, pf_valid, pf_ready = 1'b1;
  train_t train = '0;
  line_addr_t pf_addr;
  int checks = 0, failures = 0;
  logic offset_valid;
  logic signed [7:0] best_offset;

  mbop_prefetcher dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  line_addr_t rr [$];
  int         sc [int];
  int         m_ecnt = 0, m_off = 0;
  bit         m_ov = 0;
  int         n_on = 0, n_off = 0;
  line_addr_t exp_q [$];

  function automatic int sdiff(line_addr_t a, line_addr_t b);
    logic signed [LA_W-1:0] d = $signed(a - b);
    return int'(d);
  endfunction

  function automatic void model(line_addr_t a, bit hit);
    foreach (rr[j]) begin
      int d = sdiff(a, rr[j]);
      if (d != 0 && d >= -MAXO && d <= MAXO) sc[d] = sc.exists(d) ? sc[d] + 1 : 1;
    end
    if (m_ov && !hit) exp_q.push_back(a + line_addr_t'(m_off));
    rr.push_front(a);
    if (rr.size() > NRR) void'(rr.pop_back());
    if (m_ecnt + 1 >= ELEN) begin
      int best = 0, bo = -MAXO;
      for (int o = -MAXO; o <= MAXO; o++)
        if (o != 0 && sc.exists(o) && sc[o] > best) begin best = sc[o]; bo = o; end
      m_ov = (best >= STH);
      m_off = bo;
      sc.delete();
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

  task automatic access(line_addr_t a, int reason, int core, bit hit);
    int nexp;
    model(a, hit);
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
    line_addr_t sp [4];
    int stride;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < 4; s++) sp[s] = line_addr_t'(1000000 * (s + 1));
    for (int n = 0; n < 4200; n++) begin
      int ph;
      ph = (n / 600) % 4;
      if (n == 3000) check_rate = 0;
      stride = (ph == 0) ? 3 : (ph == 1) ? -5 : 7;
      if (ph == 3 || $urandom_range(9) == 0) access(line_addr_t'($urandom), 0, 0, $urandom_range(2) == 0);
      else begin
        int s;
        s = $urandom_range(3);
        sp[s] = sp[s] + line_addr_t'(stride);
        access(sp[s], 0, 0, $urandom_range(2) == 0);
      end
      checks += 2;
      if (offset_valid !== m_ov) begin
        failures++;
        $display("access %0d: offset_valid %b, expected %b", n, offset_valid, m_ov);
      end
      if (m_ov && int'(best_offset) != m_off) begin
        failures++;
        $display("access %0d: offset %0d, expected %0d", n, best_offset, m_off);
      end
      if (m_ov) n_on++; else n_off++;
    end
    checks += 2;
    if (n_on == 0) begin failures++; $display("offset never active"); end
    if (n_off == 0) begin failures++; $display("offset never off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
