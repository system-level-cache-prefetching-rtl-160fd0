// tb_slc_cache: self-checking test of the system level cache, at its default
// size (1 MiB, 4 ways, 4096 sets), against the behavioural DRAM model.
//
// Directed part: a read miss and its latency, a read hit and its latency
// (lat counts the accepting clock edge as 1: a hit answers at 2, a clean miss
// at LAT + 5), a prefetch that later hits (useful), a prefetch of
// a resident line (filtered), a demand miss joining an in-flight prefetch
// (late), write allocation, dirty evictions in an overfull set, and
// non-cacheable reads and writes that bypass the cache. Random part: reads,
// writes, non-cacheable accesses and prefetches over a few crowded sets, with
// the prefetcher's train_ready dropped at random. Every read must return the
// last data written to its line (a reference memory kept by the test); the
// training events, the hit count and the DRAM traffic must agree with the
// cache's statistics.
module tb_slc_cache;
  import slc_pkg::*;

  localparam int LAT = 40, WD = 2000000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready, rsp_valid, rsp_ready = 1'b1;
  slc_req_t req = '0;
  line_data_t req_wdata = '0, rsp_rdata, mem_wdata, mem_rsp_rdata;
  slc_rsp_t rsp;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  mem_req_t mem_req;
  logic [MSHR_W-1:0] mem_rsp_tag;
  logic train_valid, train_ready = 1'b1;
  train_t train;
  logic pfq_valid, pfq_ready;
  line_addr_t pfq_addr;
  slc_stats_t stats;
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  slc_cache dut (.*);
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

  // ---------------- reference memory ----------------
  line_data_t ref_mem [line_addr_t];

  function automatic line_data_t expect_line(line_addr_t a);
    line_data_t d;
    logic [31:0] w;
    if (ref_mem.exists(a)) return ref_mem[a];
    w = 32'(a) ^ 32'h5A5A_0000;
    for (int i = 0; i < 16; i++) d[i*32 +: 32] = {w, w} >> (32 - i);
    return d;
  endfunction

  function automatic line_data_t rnd_line();
    line_data_t d;
    for (int i = 0; i < 16; i++) d[i*32 +: 32] = $urandom;
    return d;
  endfunction

  // ---------------- prefetch queue and training monitor ----------------
  line_addr_t pf_in [$];
  int n_pf_pop = 0, n_train = 0, n_train_hit = 0, n_cread = 0;
  bit rand_train = 0;

  int busy = 0;

  // prefetch addresses offered to the cache; the training port behaves like
  // a prefetcher that is busy for a few cycles after some training events
  always @(negedge clk) begin
    if (rand_train) begin
      if (busy > 0) begin train_ready = 1'b0; busy--; end
      else train_ready = 1'b1;
    end
    pfq_valid = pf_in.size() > 0;
    pfq_addr  = pfq_valid ? pf_in[0] : '0;
    #1;
    if (rst_n && train_valid) begin
      n_train++;
      if (train.hit) n_train_hit++;
      check(train_ready, "training event while the prefetcher is busy");
      if (rand_train) busy = $urandom_range(3);
    end
    if (rst_n && pfq_valid && pfq_ready) begin
      void'(pf_in.pop_front());
      n_pf_pop++;
    end
  end

  // ---------------- demand driver ----------------
  int lat;
  logic [ID_W-1:0] next_id = '0;

  task automatic access(bit wr, bit cacheable, line_addr_t a, line_data_t wd = '0);
    @(negedge clk);
    req.id = next_id; req.write = wr; req.cacheable = cacheable; req.addr = a;
    req.reason = reason_t'(a % 48); req.core = core_t'(a % 4);
    req_wdata = wd;
    req_valid = 1'b1;
    #2;
    while (!req_ready) begin @(negedge clk); #2; end
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    check(rsp.id == next_id && rsp.write == wr, "response id or type");
    if (!wr) begin
      if (rsp_rdata !== expect_line(a)) begin
        failures++;
        $display("FAIL: read of line %0h returned wrong data", a);
      end
      checks++;
      if (cacheable) n_cread++;
    end else ref_mem[a] = wd;
    next_id++;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    slc_stats_t s0;
    int r0, w0;
    line_data_t d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(2);

    // read miss then hit
    access(0, 1, 26'h0001234);
    check(lat == LAT + 5, $sformatf("read miss latency %0d, expected %0d", lat, LAT + 5));
    access(0, 1, 26'h0001234);
    check(lat == 2, $sformatf("read hit latency %0d, expected 2", lat));
    check(stats.rd_hits == 1 && stats.rd_misses == 1, "hit and miss counts");

    // useful prefetch
    pf_in.push_back(26'h0002000);
    idle(LAT + 20);
    check(stats.pf_issued == 1, "prefetch issued");
    access(0, 1, 26'h0002000);
    check(lat == 2, "prefetched line hits");
    check(stats.pf_useful == 1, "prefetch counted useful");

    // prefetch of a resident line is filtered
    pf_in.push_back(26'h0001234);
    idle(10);
    check(stats.pf_filtered == 1 && stats.pf_issued == 1, "resident prefetch filtered");

    // late prefetch: demand joins the in-flight fill
    pf_in.push_back(26'h0003000);
    idle(4);
    access(0, 1, 26'h0003000);
    check(stats.pf_late == 1, "late prefetch merged");
    check(lat < LAT + 4, "late prefetch answered early");

    // write allocate, then hit
    d = rnd_line();
    access(1, 1, 26'h0004000, d);
    access(0, 1, 26'h0004000);
    check(lat == 2, "written line hits");

    // five dirty lines in one set of four ways: write-back on eviction
    w0 = n_writes;
    for (int t = 0; t < 5; t++) access(1, 1, 26'h0000777 + 26'(t) * 26'h1000, rnd_line());
    check(n_writes == w0 + 1, "dirty victim written back");
    access(0, 1, 26'h0000777);   // evicted line comes back from DRAM
    check(lat > LAT, "evicted line misses");

    // non-cacheable read: no allocation
    r0 = n_reads;
    access(0, 0, 26'h0005000);
    access(0, 0, 26'h0005000);
    check(n_reads == r0 + 2, "non-cacheable reads bypass the cache");
    // non-cacheable write goes through
    w0 = n_writes;
    access(1, 0, 26'h0006000, rnd_line());
    check(n_writes == w0 + 1, "non-cacheable write written through");
    access(0, 1, 26'h0006000);
    check(stats.bypasses == 3, "bypass count");

    // ---------------- random ----------------
    rand_train = 1;
    for (int n = 0; n < 3000; n++) begin
      int op;
      line_addr_t a;
      op = $urandom_range(99);
      a = line_addr_t'(16'h0100 + $urandom_range(5)) + line_addr_t'($urandom_range(7)) * 26'h1000;
      if (op < 45)      access(0, 1, a);
      else if (op < 70) access(1, 1, a, rnd_line());
      else if (op < 78) access(0, 0, a);
      else if (op < 83) access(1, 0, a, rnd_line());
      else begin
        pf_in.push_back(a);
        if ($urandom_range(1)) idle($urandom_range(LAT));
      end
    end
    rand_train = 0;
    train_ready = 1'b1;
    idle(LAT * 4);

    check(n_train == n_cread, $sformatf("training events %0d, cacheable reads %0d", n_train, n_cread));
    check(n_train_hit == stats.rd_hits, "training hit flags agree with hit count");
    check(stats.rd_hits + stats.rd_misses == n_cread, "hits + misses = cacheable reads");
    check(stats.ext_reads == n_reads, "DRAM reads agree");
    check(stats.ext_writes == n_writes, "DRAM writes agree");
    check(stats.pf_issued + stats.pf_filtered == n_pf_pop, "every prefetch issued or filtered");
    check(stats.pf_useful + stats.pf_late <= stats.pf_issued, "useful prefetches bounded");
    check(stats.pf_useful > 1 && stats.pf_late > 1 && stats.pf_filtered > 1, "prefetch outcomes all seen");
    $display("hits %0d misses %0d pf issued %0d useful %0d late %0d filtered %0d wb %0d",
             stats.rd_hits, stats.rd_misses, stats.pf_issued, stats.pf_useful, stats.pf_late,
             stats.pf_filtered, stats.ext_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
