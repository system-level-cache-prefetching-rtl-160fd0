// dram_model: behavioural model of the external memory behind the SLC (not
// synthesizable; for simulation only).
//
// Every request is accepted at once. A read returns its line LATENCY cycles
// after it was accepted, tagged with the request's tag, in request order; a
// response waits while mem_rsp_ready is low. A write updates the stored line.
// A line never written reads as init_line(addr): the 32-bit word
// addr ^ 32'h5A5A_0000 rotated left by the word index, for the sixteen words
// of the line. The fixed latency mirrors a memory that takes a fixed number of
// cycles for every request; the value is a parameter.
module dram_model
  import slc_pkg::*;
#(
  parameter int unsigned LATENCY = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_req_valid,
  output logic              mem_req_ready,
  input  mem_req_t          mem_req,
  input  line_data_t        mem_wdata,
  output logic              mem_rsp_valid,
  input  logic              mem_rsp_ready,
  output logic [MSHR_W-1:0] mem_rsp_tag,
  output line_data_t        mem_rsp_rdata,
  output int                n_reads,
  output int                n_writes
);

  typedef struct {
    longint            due;
    logic [MSHR_W-1:0] tag;
    line_data_t        data;
  } pend_t;

  line_data_t mem [line_addr_t];
  pend_t      q [$];
  longint     cyc;

  function automatic line_data_t init_line(line_addr_t a);
    line_data_t d;
    logic [31:0] w;
    w = 32'(a) ^ 32'h5A5A_0000;
    for (int i = 0; i < LINE_BITS / 32; i++) d[i*32 +: 32] = (w << i) | (w >> (32 - i) % 32);
    return d;
  endfunction

  assign mem_req_ready = 1'b1;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q.delete();
      cyc           <= 0;
      n_reads       <= 0;
      n_writes      <= 0;
      mem_rsp_valid <= 1'b0;
      mem_rsp_tag   <= '0;
      mem_rsp_rdata <= '0;
    end else begin
      pend_t p;
      if (mem_rsp_valid && mem_rsp_ready) void'(q.pop_front());
      if (mem_req_valid) begin
        if (mem_req.write) begin
          mem[mem_req.addr] = mem_wdata;
          n_writes <= n_writes + 1;
        end else begin
          p.due  = cyc + LATENCY;
          p.tag  = mem_req.tag;
          p.data = mem.exists(mem_req.addr) ? mem[mem_req.addr] : init_line(mem_req.addr);
          q.push_back(p);
          n_reads <= n_reads + 1;
        end
      end
      cyc <= cyc + 1;
      if (q.size() > 0 && q[0].due <= cyc + 1) begin
        mem_rsp_valid <= 1'b1;
        mem_rsp_tag   <= q[0].tag;
        mem_rsp_rdata <= q[0].data;
      end else begin
        mem_rsp_valid <= 1'b0;
      end
    end
  end

endmodule
