// workload_lane: one hybrid_prefetcher with its memory, driven through three
// access-pattern kernels standing for the program classes the prefetcher is
// meant for. Used by the workload testbenches; not a testbench by itself.
//   A  regular (shallow-water / Navier-Stokes style): 6 arrays swept with unit
//      line stride in lockstep, 6 load PCs, misses of one sweep step issued
//      together and then waited for (as an out-of-order core overlaps them).
//   B  long lists (health style): 4 lists of 25 scattered nodes, each walked
//      once; data load at +8, next pointer at +4.
//   C  short lists (hash-bucket style): 64 buckets of 4-node lists; each lookup
//      walks 1 or 2 nodes (1.5 on average).
// The kernels run one after the other from reset. The lane stands in for the
// L1, the L2 and the core: an L2 is a set of lines that were delivered, answered
// on l2_probe_* and used for req_l2_hit; committed loads follow each access.
// Interface: clk in; done rises when all kernels have run; checks/failures
// count the lane's own checks (every line handed out equals memory, every
// demand is answered, nothing unrequested is delivered); per kernel k,
// sb_served[k] of accesses[k] misses were served by stream buffers (on time
// or late), in cycles[k] cycles. NUM_SB and SB_DEPTH set the buffer
// configuration, EN_STRIDE and EN_LDS the buffer types (both: hybrid); the
// other sizes are the defaults.
module workload_lane
  import pf_pkg::*;
#(
  parameter int unsigned NUM_SB   = 16,
  parameter int unsigned SB_DEPTH = 2,
  parameter bit          EN_STRIDE = 1'b1,
  parameter bit          EN_LDS    = 1'b1
) (
  input  logic   clk,
  output logic   done,
  output int     checks,
  output int     failures,
  output int     sb_served [3],
  output int     accesses  [3],
  output longint cycles    [3]
);
  logic   req_valid = 1'b0, req_l2_hit = 1'b0, req_ready;
  addr_t  req_pc = '0, req_addr = '0;
  logic   ld_valid = 1'b0, l2_probe_hit = 1'b0;
  laddr_t l2_probe_laddr;
  addr_t  ld_pc = '0, ld_base = '0, ld_ea = '0, ld_value = '0;
  logic   pb_valid, l2_fill_valid, l2_fill_late;
  laddr_t pb_laddr, l2_fill_laddr;
  line_t  pb_data, l2_fill_data;
  logic   mem_req_valid, mem_resp_valid;
  logic [3:0] mem_req_idx, mem_resp_idx;
  laddr_t mem_req_laddr;
  line_t  mem_resp_data;
  logic   beat_valid, bus_busy;
  beat_t  beat_data;
  logic [NUM_SB-1:0] sb_active, sb_lds;
  logic   ev_demand_miss, ev_alloc_stride, ev_alloc_lds, ev_pb_hit, ev_late_hit,
          ev_prefetch, ev_ct_write, ev_stall, ev_pf_skip;

  hybrid_prefetcher #(.NUM_SB(NUM_SB), .SB_DEPTH(SB_DEPTH), .EN_STRIDE(EN_STRIDE), .EN_LDS(EN_LDS))
    dut (.*);
  dram_model #(.LAT(85), .IDX_W(4)) mem (.*);

  logic rst_n = 1'b0;
  initial begin checks = 0; failures = 0; done = 1'b0; end
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  bit     l2 [laddr_t];
  longint pend [laddr_t];
  int     src [laddr_t];
  always @(negedge clk) l2_probe_hit <= l2.exists(l2_probe_laddr);

  always @(negedge clk) if (rst_n) begin
    if (pb_valid) begin
      check(pb_data == mem.line_at(pb_laddr), "buffer line data");
      if (pend.exists(pb_laddr)) begin src[pb_laddr] = 1; pend.delete(pb_laddr); end
      else check(0, "unrequested buffer line");
      l2[pb_laddr] = 1;
    end
    if (l2_fill_valid) begin
      check(l2_fill_data == mem.line_at(l2_fill_laddr), "fill line data");
      if (pend.exists(l2_fill_laddr)) begin src[l2_fill_laddr] = l2_fill_late ? 2 : 0; pend.delete(l2_fill_laddr); end
      else check(0, "unrequested fill");
      l2[l2_fill_laddr] = 1;
    end
  end

  task automatic l1_miss(input addr_t pc, input addr_t a);
    @(negedge clk);
    req_valid = 1'b1; req_pc = pc; req_addr = a;
    req_l2_hit = l2.exists(line_of(a));
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    if (!req_l2_hit) pend[line_of(a)] = cyc;
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  task automatic wait_all();
    int n = 0;
    while (pend.size() > 0 && n < 5000) begin @(negedge clk); n++; end
    check(pend.size() == 0, "all demands answered");
  endtask

  task automatic commit(input addr_t pc, input addr_t base, input addr_t ea, input addr_t v);
    @(negedge clk);
    ld_valid = 1'b1; ld_pc = pc; ld_base = base; ld_ea = ea; ld_value = v;
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  // served from a buffer (on time or late) / from memory
  int served_sb, served_mem;
  task automatic tally(input addr_t a);
    if (src.exists(line_of(a))) begin
      if (src[line_of(a)] == 0) served_mem++; else served_sb++;
    end
  endtask

  initial begin
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ================= A: regular sweeps =================
    served_sb = 0; served_mem = 0; t0 = cyc;
    for (int i = 0; i < 60; i++) begin
      for (int j = 0; j < 6; j++) l1_miss(32'h0040_1000 + 32'(j * 4), 32'h1000_0000 + 32'(j) * 32'h0010_0000 + 32'(i * 64));
      wait_all();
      for (int j = 0; j < 6; j++) tally(32'h1000_0000 + 32'(j) * 32'h0010_0000 + 32'(i * 64));
      repeat (40) @(negedge clk);
    end
    sb_served[0] = served_sb; accesses[0] = served_sb + served_mem; cycles[0] = cyc - t0;

    // ================= B: long lists =================
    begin
      addr_t node [4][25];
      served_sb = 0; served_mem = 0; t0 = cyc;
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < 25; i++)
          node[l][i] = 32'h2000_0000 + 32'(l) * 32'h0100_0000 + 32'(((i * 53) % 97) * 8192) + 32'((i % 7) * 128);
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < 25; i++) begin
          mem.put_word(node[l][i] + 8, 32'hB000_0000 + 32'(l * 100 + i));
          mem.put_word(node[l][i] + 4, (i < 24) ? node[l][i + 1] : 32'h0);
        end
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < 25; i++) begin
          l1_miss(32'h0040_2000, node[l][i] + 8);
          wait_all();
          tally(node[l][i] + 8);
          commit(32'h0040_2000, node[l][i], node[l][i] + 8, 32'hB000_0000 + 32'(l * 100 + i));
          commit(32'h0040_2008, node[l][i], node[l][i] + 4, (i < 24) ? node[l][i + 1] : 32'h0);
          repeat (200) @(negedge clk);
        end
      sb_served[1] = served_sb; accesses[1] = served_sb + served_mem; cycles[1] = cyc - t0;
    end

    // ================= C: short hash-bucket lists =================
    begin
      addr_t node [64][4];
      served_sb = 0; served_mem = 0; t0 = cyc;
      for (int b = 0; b < 64; b++)
        for (int i = 0; i < 4; i++)
          node[b][i] = 32'h3000_0000 + 32'(((b * 4 + i) * 89) % 1021) * 32'h1000 + 32'(i * 64);
      for (int b = 0; b < 64; b++)
        for (int i = 0; i < 4; i++) begin
          mem.put_word(node[b][i], 32'hC000_0000 + 32'(b * 4 + i));
          mem.put_word(node[b][i] + 4, (i < 3) ? node[b][i + 1] : 32'h0);
        end
      for (int q = 0; q < 64; q++) begin
        int b, len;
        b   = (q * 29) % 64;
        len = (q % 2 == 0) ? 1 : 2;
        for (int i = 0; i < len; i++) begin
          l1_miss(32'h0040_3000, node[b][i]);
          wait_all();
          tally(node[b][i]);
          commit(32'h0040_3000, node[b][i], node[b][i], 32'hC000_0000 + 32'(b * 4 + i));
          commit(32'h0040_3008, node[b][i], node[b][i] + 4, (i < 3) ? node[b][i + 1] : 32'h0);
          repeat (60) @(negedge clk);
        end
      end
      sb_served[2] = served_sb; accesses[2] = served_sb + served_mem; cycles[2] = cyc - t0;
    end

    done = 1'b1;
  end
endmodule
