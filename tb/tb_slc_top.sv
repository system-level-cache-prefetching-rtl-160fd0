// tb_slc_top: end-to-end test of the SLC with each prefetcher, at the
// design's default sizes (1 MiB 4-way cache, default prefetcher parameters),
// against the behavioural DRAM model with a fixed latency of LAT cycles.
//
// The workload imitates what the SLC sees from a GPU: eight access streams,
// each moving by its own stride (positive and negative, 1 to 4 lines) and
// jumping now and then, mixed with random reads, full-line writes and
// non-cacheable reads. Streams k and k+4 carry the same request reason but
// come from different cores (core k/2), as when cores run the same work on
// different data. A deterministic generator makes the workload identical for
// every run. It is run once per prefetcher selection (none, NSP, ADP, ASDP,
// MBOP, LLC) from reset, once more switching the prefetcher every 300
// requests without a reset, and then once per selection with every request
// from a single core (the one-core GPU configuration).
//
// Checks: every read returns the last data written to its line; the DRAM
// traffic agrees with the statistics; without a prefetcher nothing is
// prefetched; each prefetcher generates prefetches that turn into hits and
// raises the hit count above the run without one. The run also counts the
// design's mechanisms and fails if one never happened: demands stalled while
// the prefetcher issues, bypasses, dirty write-backs, prefetches filtered as
// resident or in flight, late prefetches, ASDP epoch ends, an active MBOP
// offset, LLC group prefetches, an LLC group with members from several cores
// firing, and prefetcher switches. Overflows of the prefetch queue are
// counted and printed but not required. The cycles each run took are printed.
module tb_slc_top;
  import slc_pkg::*;

  localparam int LAT = 100, NREQ = 2500, WD = 20000000;

  logic clk = 1'b0, rst_n = 1'b0;
  pf_sel_e pf_sel = PF_NONE;
  logic req_valid = 1'b0, req_ready, rsp_valid, rsp_ready = 1'b1;
  slc_req_t req = '0;
  line_data_t req_wdata = '0, rsp_rdata, mem_wdata, mem_rsp_rdata;
  slc_rsp_t rsp;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  mem_req_t mem_req;
  logic [MSHR_W-1:0] mem_rsp_tag;
  slc_stats_t stats;
  logic [31:0] pf_generated, pfq_dropped;
  logic [4:0] pfq_level;
  logic [15:0] asdp_epoch_len;
  logic asdp_epoch_end, asdp_epoch_dissim, mbop_offset_valid;
  logic signed [7:0] mbop_offset;
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  slc_top dut (.*);
  dram_model #(.LATENCY(LAT)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_stall = 0, m_epoch = 0, m_offset = 0, m_llc = 0, m_group = 0, m_switch = 0;
  always @(negedge clk) begin
    if (rst_n && req_valid && !req_ready && !dut.train_ready) m_stall++;
    if (rst_n && asdp_epoch_end) m_epoch++;
    if (rst_n && mbop_offset_valid && pf_sel == PF_MBOP) m_offset++;
    if (rst_n && pf_sel == PF_LLC && dut.u_llc.pf_valid) m_llc++;
    if (rst_n && pf_sel == PF_LLC && dut.u_llc.train_valid && dut.u_llc.train_ready &&
        dut.u_llc.fire && dut.u_llc.nmem > 1) m_group++;
  end

  // ---------------- reference memory and workload ----------------
  line_data_t ref_mem [line_addr_t];

  function automatic line_data_t expect_line(line_addr_t a);
    line_data_t d;
    logic [31:0] w;
    if (ref_mem.exists(a)) return ref_mem[a];
    w = 32'(a) ^ 32'h5A5A_0000;
    for (int i = 0; i < 16; i++) d[i*32 +: 32] = {w, w} >> (32 - i);
    return d;
  endfunction

  logic [31:0] rng;
  function automatic logic [31:0] next_rand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  logic [ID_W-1:0] next_id = '0;

  task automatic access(bit wr, bit cacheable, line_addr_t a, reason_t r, core_t c,
                        line_data_t wd);
    @(negedge clk);
    req.id = next_id; req.write = wr; req.cacheable = cacheable; req.addr = a;
    req.reason = r; req.core = c;
    req_wdata = wd;
    req_valid = 1'b1;
    #2;
    while (!req_ready) begin @(negedge clk); #2; end
    @(negedge clk);
    req_valid = 1'b0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (rsp.id != next_id || rsp.write != wr) begin
      failures++;
      $display("FAIL: response id or type");
    end
    if (!wr) begin
      checks++;
      if (rsp_rdata !== expect_line(a)) begin
        failures++;
        $display("FAIL: mode %0d: read of line %0h returned wrong data", pf_sel, a);
      end
    end else ref_mem[a] = wd;
    next_id++;
  endtask

  int cyc;
  always @(posedge clk) cyc++;

  task automatic run(pf_sel_e sel, bit switching, bit one_core, output slc_stats_t st,
                     output int cycles, output int generated);
    line_addr_t sp [8];
    int ss [8] = '{1, 1, 2, -1, 4, 1, 3, -2};
    int c0;
    core_t c;
    ref_mem.delete();
    rng = 32'h1234_5678;
    pf_sel = sel;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) sp[k] = line_addr_t'(next_rand());
    c0 = cyc;
    for (int n = 0; n < NREQ; n++) begin
      int k, op;
      line_data_t d;
      if (switching && n % 300 == 299) begin
        pf_sel = pf_sel_e'((int'(pf_sel) % 5) + 1);
        m_switch++;
      end
      k  = int'(next_rand() % 8);
      op = int'(next_rand() % 100);
      if (next_rand() % 64 == 0) sp[k] = line_addr_t'(next_rand());
      sp[k] = sp[k] + line_addr_t'(ss[k]);
      for (int i = 0; i < 16; i++) d[i*32 +: 32] = next_rand();
      c = one_core ? core_t'(0) : core_t'(k / 2);
      if (op < 10)      access(0, 1, line_addr_t'(next_rand()), reason_t'(45), c, d);
      else if (op < 20) access(1, 1, sp[k], reason_t'(3 * (k % 4) + 1), c, d);
      else if (op < 24) access(0, 0, sp[k], reason_t'(3 * (k % 4) + 1), c, d);
      else              access(0, 1, sp[k], reason_t'(3 * (k % 4) + 1), c, d);
    end
    repeat (LAT * 3) @(posedge clk);
    st = stats;
    cycles = cyc - c0;
    generated = int'(pf_generated);
    $display("sel %0d%s: cycles %0d hits %0d misses %0d pf gen %0d issued %0d useful %0d late %0d filtered %0d dropped %0d ext rd %0d wr %0d",
             sel, switching ? " (switching)" : one_core ? " (one core)" : "", cycles, st.rd_hits, st.rd_misses, generated,
             st.pf_issued, st.pf_useful, st.pf_late, st.pf_filtered, pfq_dropped,
             st.ext_reads, st.ext_writes);
  endtask

  initial begin
    slc_stats_t st [7], st1 [6];
    int cy [7], gen [7], cy1 [6], gen1 [6];
    int tot_bypass = 0, tot_wb = 0, tot_filt = 0, tot_late = 0, tot_drop = 0;
    for (int m = 0; m < 6; m++) begin
      run(pf_sel_e'(m), 0, 0, st[m], cy[m], gen[m]);
      tot_bypass += int'(st[m].bypasses);
      tot_wb     += int'(st[m].ext_writes);
      tot_filt   += int'(st[m].pf_filtered);
      tot_late   += int'(st[m].pf_late);
      tot_drop   += int'(pfq_dropped);
      check(st[m].ext_reads == 32'(n_reads) && st[m].ext_writes == 32'(n_writes),
            $sformatf("mode %0d: DRAM traffic agrees with the statistics", m));
      if (m == 0) check(gen[m] == 0 && st[m].pf_issued == 0, "no prefetches without a prefetcher");
      else begin
        check(gen[m] > 0 && st[m].pf_issued > 0 && st[m].pf_useful > 0,
              $sformatf("mode %0d: prefetches generated, issued and used", m));
        check(st[m].rd_hits > st[0].rd_hits,
              $sformatf("mode %0d: more hits than without a prefetcher (%0d vs %0d)",
                        m, st[m].rd_hits, st[0].rd_hits));
      end
    end
    run(PF_NSP, 1, 0, st[6], cy[6], gen[6]);
    check(gen[6] > 0 && st[6].pf_useful > 0, "switching run prefetches");
    tot_drop += int'(pfq_dropped);
    // the same workload issued by a single core
    for (int m = 0; m < 6; m++) begin
      run(pf_sel_e'(m), 0, 1, st1[m], cy1[m], gen1[m]);
      tot_drop += int'(pfq_dropped);
      check(st1[m].ext_reads == 32'(n_reads) && st1[m].ext_writes == 32'(n_writes),
            $sformatf("one core, mode %0d: DRAM traffic agrees with the statistics", m));
      if (m > 0)
        check(st1[m].pf_useful > 0 && st1[m].rd_hits > st1[0].rd_hits,
              $sformatf("one core, mode %0d: more hits than without a prefetcher (%0d vs %0d)",
                        m, st1[m].rd_hits, st1[0].rd_hits));
    end

    $display("mechanisms: prefetcher stalls %0d bypasses %0d write-backs %0d filtered %0d late %0d queue overflows %0d epochs %0d mbop-active %0d llc-group-pf %0d llc-multi-member %0d switches %0d",
             m_stall, tot_bypass, tot_wb, tot_filt, tot_late, tot_drop, m_epoch, m_offset, m_llc, m_group, m_switch);
    check(m_stall > 0, "demand stalled by a busy prefetcher");
    check(tot_bypass > 0, "bypass seen");
    check(tot_wb > 0, "dirty write-back seen");
    check(tot_filt > 0, "filtered prefetch seen");
    check(tot_late > 0, "late prefetch seen");
    check(m_epoch > 0, "ASDP epoch end seen");
    check(m_offset > 0, "MBOP offset active");
    check(m_llc > 0, "LLC group prefetch seen");
    check(m_group > 0, "LLC group of several cores fired");
    check(m_switch > 0, "prefetcher switch seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
