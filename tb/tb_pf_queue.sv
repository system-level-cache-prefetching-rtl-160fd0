// tb_pf_queue: self-checking test of the prefetch queue.
//
// Random pushes and pops, with phases where the consumer stalls so that the
// queue fills and drops addresses, and a flush. A queue in the test holds the
// expected contents; every popped address, the fill level and the drop count
// are compared with it each cycle.
module tb_pf_queue;
  import slc_pkg::*;

  localparam int DEPTH = 16, WD = 100000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic flush = 1'b0, in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  line_addr_t in_addr = '0, out_addr;
  logic [31:0] dropped;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0;

  pf_queue #(.DEPTH(DEPTH)) dut (.*);

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
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  line_addr_t model [$];
  int m_drop = 0, n_full = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int phase;
      @(negedge clk);
      phase = (n / 500) % 3;      // 0: balanced, 1: consumer stalls, 2: consumer fast
      in_valid  = ($urandom_range(1) == 1);
      in_addr   = line_addr_t'($urandom);
      out_ready = (phase == 1) ? ($urandom_range(9) == 0) : (phase == 2) ? 1'b1 : $urandom_range(1);
      flush     = (n % 3333 == 3332);
      #1;
      check(in_ready, "queue refuses input");
      check(32'(level) == model.size(), $sformatf("level %0d, expected %0d", level, model.size()));
      check(out_valid == (model.size() > 0), "out_valid");
      if (out_valid && model.size() > 0)
        check(out_addr == model[0], $sformatf("head %0h, expected %0h", out_addr, model[0]));
      check(dropped == 32'(m_drop), "drop count");
      // model the coming clock edge
      if (flush) model.delete();
      else begin
        if (out_valid && out_ready) void'(model.pop_front());
        if (in_valid) begin
          if (model.size() < DEPTH) model.push_back(in_addr);
          else begin m_drop++; n_full++; end
        end
      end
    end
    @(negedge clk);
    check(n_full > 0, "queue never overflowed");
    $display("overflows %0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
