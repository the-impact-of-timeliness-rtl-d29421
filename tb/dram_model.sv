// dram_model: behavioural model of the main-memory devices behind mreq_buffer.
//
// Not synthesizable; used by the testbenches only. Every request is answered
// exactly LAT cycles after the cycle it was issued in (constant device latency,
// unbounded address bandwidth, as the memory system assumes), with the request's
// entry index. The content of a line is whatever was placed with put_word(), or
// else a pattern computed from the line address (pattern_line()), so the
// testbenches can predict every returned line.
module dram_model
  import pf_pkg::*;
#(
  parameter int unsigned LAT     = 85,
  parameter int unsigned IDX_W   = 4
) (
  input  logic             clk,
  input  logic             mem_req_valid,
  input  logic [IDX_W-1:0] mem_req_idx,
  input  laddr_t           mem_req_laddr,
  output logic             mem_resp_valid,
  output logic [IDX_W-1:0] mem_resp_idx,
  output line_t            mem_resp_data
);
  typedef struct {
    longint           due;
    logic [IDX_W-1:0] idx;
    laddr_t           laddr;
  } pend_t;

  pend_t  q[$];
  line_t  mem[laddr_t];
  longint cyc = 0;
  int     nreq = 0;

  function automatic line_t pattern_line(laddr_t a);
    line_t l;
    for (int w = 0; w < LINE_BYTES / 4; w++) l[w*32 +: 32] = {a[15:0], 16'(w * 16'h1111)} ^ 32'h5a5a0000;
    return l;
  endfunction

  function automatic line_t line_at(laddr_t a);
    return mem.exists(a) ? mem[a] : pattern_line(a);
  endfunction

  function automatic void put_word(addr_t a, addr_t v);
    line_t l;
    l = line_at(line_of(a));
    l[a[OFF_BITS-1:2]*32 +: 32] = v;
    mem[line_of(a)] = l;
  endfunction

  initial begin
    mem_resp_valid = 1'b0;
    mem_resp_idx   = '0;
    mem_resp_data  = '0;
  end

  always @(posedge clk) begin
    if (mem_req_valid) begin
      q.push_back('{due: cyc + LAT, idx: mem_req_idx, laddr: mem_req_laddr});
      nreq++;
    end
    cyc = cyc + 1;
    if (q.size() > 0 && q[0].due == cyc) begin
      mem_resp_valid <= 1'b1;
      mem_resp_idx   <= q[0].idx;
      mem_resp_data  <= line_at(q[0].laddr);
      void'(q.pop_front());
    end else begin
      mem_resp_valid <= 1'b0;
    end
  end
endmodule
