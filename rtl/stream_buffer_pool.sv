// stream_buffer_pool: the set of NUM stream buffers searched alongside the L2.
//
// Holds NUM (16) stream_buffer instances of DEPTH (2) lines each. A lookup
// compares the line address with every tag of every buffer in parallel
// (NUM x DEPTH comparators). Allocation picks, in this order, the buffer that
// already streams for the same load PC, an unused buffer, or the least recently
// used one; a buffer counts as used when it is allocated and when a demand takes
// a line from it. Prefetch requests of the buffers are served round robin, one
// per cycle, towards the memory request buffer; returning prefetches are routed
// back by their tag {buffer, entry}, and every returning line (also demand
// fills) is shown to all buffers so that LDS buffers can read pointers from it.
//
// Before a strided candidate goes to memory it is checked against the L2 (an
// external tag probe, l2_probe_*, answered in the same cycle) and against the
// other buffers; if either holds the line, the buffer steps past it.
//
// Following the design: the number and depth of buffers, the parallel search,
// LRU replacement, allocation per load PC, not prefetching lines already in the
// L2 or a buffer. This implementation's choices: reuse
// of a buffer already bound to the PC, round-robin request arbitration.
//
// Timing: lookup (hit, hit_ready, hit_data) and late_* are combinational;
// allocation, consumption and issue take effect at the clock edge.
module stream_buffer_pool
  import pf_pkg::*;
#(
  parameter int unsigned NUM   = 16,
  parameter int unsigned DEPTH = 2,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             alloc_valid,
  input  sb_mode_e         alloc_mode,
  input  addr_t            alloc_pc,
  input  addr_t            alloc_miss_addr,
  input  laddr_t           alloc_next_laddr,
  input  stride_t          alloc_stride,
  input  doff_t            alloc_pdisp,
  input  doff_t            alloc_cdisp,
  input  logic             lk_valid,
  input  laddr_t           lk_laddr,
  input  logic             lk_take,
  output logic             hit,
  output logic             hit_ready,
  output line_t            hit_data,
  output logic             pf_req_valid,
  output laddr_t           pf_req_laddr,
  output logic [TAG_W-1:0] pf_req_tag,
  input  logic             pf_grant,
  // L2 presence probe of the selected candidate (same cycle)
  output laddr_t           l2_probe_laddr,
  input  logic             l2_probe_hit,
  output logic             pf_skipped,   // a candidate was skipped this cycle
  input  logic             fill_valid,
  input  laddr_t           fill_laddr,
  input  line_t            fill_data,
  input  logic             fill_demand,
  input  logic [TAG_W-1:0] fill_tag,
  output logic             late_valid,
  output laddr_t           late_laddr,
  output line_t            late_data,
  output logic [NUM-1:0]   active,
  output logic [NUM-1:0]   lds          // buffer g streams a linked structure
);
  localparam int unsigned BW = $clog2(NUM);
  localparam int unsigned SW = $clog2(DEPTH > 1 ? DEPTH : 2);

  addr_t          b_pc      [NUM];
  sb_mode_e       b_mode    [NUM];
  logic [NUM-1:0] b_hit, b_hit_ready, b_req, b_grant, b_alloc, b_take, b_mine, b_late, b_chk, b_skip;
  line_t          b_hit_data [NUM];
  laddr_t         b_req_laddr[NUM];
  logic [SW-1:0]  b_req_slot [NUM];
  laddr_t         b_late_laddr[NUM];
  line_t          b_late_data [NUM];

  logic [BW-1:0]  rank [NUM];      // 0 = most recently used
  logic [BW-1:0]  victim, hbuf, gbuf, rr;
  logic           gvalid;

  // ---------------- victim choice ----------------
  always_comb begin
    logic found_pc, found_free;
    logic [BW-1:0] pc_i, free_i, lru_i;
    found_pc = 1'b0; found_free = 1'b0; pc_i = '0; free_i = '0; lru_i = '0;
    for (int i = 0; i < NUM; i++) begin
      if (active[i] && b_pc[i] == alloc_pc && !found_pc) begin found_pc = 1'b1; pc_i = BW'(i); end
      if (!active[i] && !found_free) begin found_free = 1'b1; free_i = BW'(i); end
      if (rank[i] == BW'(NUM - 1)) lru_i = BW'(i);
    end
    victim = found_pc ? pc_i : found_free ? free_i : lru_i;
  end

  // ---------------- lookup ----------------
  always_comb begin
    hit = 1'b0; hbuf = '0;
    for (int i = 0; i < NUM; i++)
      if (lk_valid && b_hit[i] && !hit) begin hit = 1'b1; hbuf = BW'(i); end
  end
  assign hit_ready = hit && b_hit_ready[hbuf];
  assign hit_data  = b_hit_data[hbuf];

  // ---------------- request arbitration (round robin) ----------------
  always_comb begin
    gvalid = 1'b0; gbuf = '0;
    for (int k = 0; k < NUM; k++) begin
      logic [BW-1:0] j;
      j = BW'((int'(rr) + k) % NUM);
      if (b_req[j] && !gvalid) begin gvalid = 1'b1; gbuf = j; end
    end
  end
  // A strided candidate already in the L2 or in another buffer is skipped
  // instead of being sent to memory. LDS candidates are always fetched.
  logic skip;
  assign l2_probe_laddr = b_req_laddr[gbuf];
  assign skip           = gvalid && b_mode[gbuf] == SB_STRIDE && (l2_probe_hit || (b_chk != '0));
  assign pf_req_valid   = gvalid && !skip;
  assign pf_skipped     = skip;
  assign pf_req_laddr   = b_req_laddr[gbuf];
  assign pf_req_tag   = TAG_W'({gbuf, b_req_slot[gbuf]});

  // ---------------- late hits ----------------
  always_comb begin
    late_valid = 1'b0; late_laddr = '0; late_data = '0;
    for (int i = 0; i < NUM; i++)
      if (b_late[i] && !late_valid) begin
        late_valid = 1'b1; late_laddr = b_late_laddr[i]; late_data = b_late_data[i];
      end
  end

  logic [BW-1:0] fill_buf;
  logic [SW-1:0] fill_slot;
  assign fill_buf  = fill_tag[SW +: BW];
  assign fill_slot = fill_tag[SW-1:0];
  // tag bits above {buffer, entry} are unused when TAG_W is wider

  for (genvar g = 0; g < NUM; g++) begin : g_sb
    assign lds[g]     = active[g] && b_mode[g] == SB_LDS;
    assign b_alloc[g] = alloc_valid && victim == BW'(g);
    assign b_take[g]  = lk_valid && lk_take && hit && hbuf == BW'(g);
    assign b_grant[g] = gvalid && !skip && pf_grant && gbuf == BW'(g);
    assign b_skip[g]  = skip && gbuf == BW'(g);
    assign b_mine[g]  = !fill_demand && fill_buf == BW'(g);

    stream_buffer #(.DEPTH(DEPTH)) u_sb (
      .clk, .rst_n,
      .alloc_valid      (b_alloc[g]),
      .alloc_mode, .alloc_pc, .alloc_miss_addr, .alloc_next_laddr, .alloc_stride,
      .alloc_pdisp, .alloc_cdisp,
      .active           (active[g]),
      .pc               (b_pc[g]),
      .mode             (b_mode[g]),
      .lk_laddr,
      .hit              (b_hit[g]),
      .hit_ready        (b_hit_ready[g]),
      .hit_data         (b_hit_data[g]),
      .lk_take          (b_take[g]),
      .pf_req_valid     (b_req[g]),
      .pf_req_laddr     (b_req_laddr[g]),
      .pf_req_slot      (b_req_slot[g]),
      .pf_grant         (b_grant[g]),
      .pf_skip          (b_skip[g]),
      .chk_laddr        (b_req_laddr[gbuf]),
      .chk_hit          (b_chk[g]),
      .fill_valid, .fill_laddr, .fill_data,
      .fill_mine        (b_mine[g]),
      .fill_slot,
      .late_valid       (b_late[g]),
      .late_laddr       (b_late_laddr[g]),
      .late_data        (b_late_data[g])
    );
  end

  // ---------------- LRU ranks and round-robin pointer ----------------
  logic          touch;
  logic [BW-1:0] tbuf;
  assign touch = alloc_valid || (lk_valid && lk_take && hit);
  assign tbuf  = alloc_valid ? victim : hbuf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM; i++) rank[i] <= BW'(i);
      rr <= '0;
    end else begin
      if (touch) begin
        for (int i = 0; i < NUM; i++)
          if (rank[i] < rank[tbuf]) rank[i] <= rank[i] + 1'b1;
        rank[tbuf] <= '0;
      end
      if (gvalid && (pf_grant || skip)) rr <= BW'((int'(gbuf) + 1) % NUM);
    end
  end
endmodule
