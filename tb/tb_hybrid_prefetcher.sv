// tb_hybrid_prefetcher: end-to-end test of the hybrid prefetcher at its default
// configuration (16 stream buffers of 2 lines, 32-entry stride table, 128-entry
// producer window, 256-entry correlation table, 16-entry mreq buffer).
//
// A small processor/L2 model drives the prefetcher against the main-memory
// model (85-cycle device latency, 16-byte bus at 7.5 cycles per beat):
//   phase 1  a load PC walks an array with a stride of 3 lines, waiting for each
//            line: the first misses take 115 cycles, the stride is detected, a
//            strided buffer is allocated and later lines come from it after 10
//            cycles (or late, while still in flight).
//   phase 2  a linked list of scattered nodes is traversed: the commit stream
//            (data load at +0, next-pointer load at +4) trains the producer
//            window and correlation table; misses of the data load then
//            allocate LDS buffers that run ahead along the list. The list ends
//            with a null pointer.
//   phase 3  a burst of independent misses fills the mreq buffer, so requests
//            stall, while strided buffers keep prefetching.
//   phase 4  a strided walk runs into lines the L2 already holds; the L2 tag
//            probe makes the buffer step past them instead of fetching them.
// Every line handed to the L1/L2 is compared with the memory model's content,
// every demand is answered exactly once, and each mechanism (demand miss,
// strided and LDS allocation, prefetch, buffer hit, late hit, CT training,
// stall, skipped candidate) must have happened at least once.
module tb_hybrid_prefetcher;
  import pf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

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
  logic [15:0] sb_active, sb_lds;
  logic   ev_demand_miss, ev_alloc_stride, ev_alloc_lds, ev_pb_hit, ev_late_hit,
          ev_prefetch, ev_ct_write, ev_stall, ev_pf_skip;

  hybrid_prefetcher dut (.*);
  dram_model #(.LAT(85), .IDX_W(4)) mem (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // ---------------- L2 model and response monitor ----------------
  bit     l2 [laddr_t];          // lines present in L2
  longint pend [laddr_t];        // outstanding demands: request cycle
  longint lat [laddr_t];         // latency of the last answer
  int     src [laddr_t];         // 0 memory, 1 buffer hit, 2 late buffer hit
  // the L2 answers tag probes for prefetch candidates
  always @(negedge clk) l2_probe_hit <= l2.exists(l2_probe_laddr);
  int n_skip = 0;
  int n_dm = 0, n_as = 0, n_al = 0, n_pb = 0, n_late = 0, n_pf = 0, n_ct = 0, n_stall = 0, n_beats = 0;

  always @(negedge clk) if (rst_n) begin
    if (pb_valid) begin
      check(pb_data == mem.line_at(pb_laddr), $sformatf("buffer line %h data", pb_laddr));
      check(pend.exists(pb_laddr), $sformatf("buffer line %h was asked for", pb_laddr));
      if (pend.exists(pb_laddr)) begin
        lat[pb_laddr] = cyc - pend[pb_laddr]; src[pb_laddr] = 1; pend.delete(pb_laddr);
      end
      l2[pb_laddr] = 1;
    end
    if (l2_fill_valid) begin
      check(l2_fill_data == mem.line_at(l2_fill_laddr), $sformatf("fill line %h data", l2_fill_laddr));
      check(pend.exists(l2_fill_laddr), $sformatf("fill line %h was asked for", l2_fill_laddr));
      if (pend.exists(l2_fill_laddr)) begin
        lat[l2_fill_laddr] = cyc - pend[l2_fill_laddr]; src[l2_fill_laddr] = l2_fill_late ? 2 : 0;
        pend.delete(l2_fill_laddr);
      end
      l2[l2_fill_laddr] = 1;
    end
    n_dm += int'(ev_demand_miss); n_as += int'(ev_alloc_stride); n_al += int'(ev_alloc_lds);
    n_pb += int'(ev_pb_hit); n_late += int'(ev_late_hit); n_pf += int'(ev_prefetch);
    n_skip += int'(ev_pf_skip);
    n_ct += int'(ev_ct_write); n_stall += int'(ev_stall); n_beats += int'(beat_valid);
  end

  // one L1 miss; returns once accepted
  task automatic l1_miss(input addr_t pc, input addr_t a);
    @(negedge clk);
    req_valid = 1'b1; req_pc = pc; req_addr = a;
    req_l2_hit = l2.exists(line_of(a));
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    if (!req_l2_hit) pend[line_of(a)] = cyc;
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  task automatic wait_line(input addr_t a);
    int n = 0;
    while (pend.exists(line_of(a)) && n < 2000) begin @(negedge clk); n++; end
    check(!pend.exists(line_of(a)), $sformatf("line %h answered", a));
  endtask

  task automatic commit(input addr_t pc, input addr_t base, input addr_t ea, input addr_t v);
    @(negedge clk);
    ld_valid = 1'b1; ld_pc = pc; ld_base = base; ld_ea = ea; ld_value = v;
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam addr_t PC_A = 32'h0040_0100;   // strided load
  localparam addr_t PC_D = 32'h0040_0200;   // list: data field load  (ld  x, 0(p))
  localparam addr_t PC_N = 32'h0040_0208;   // list: next field load  (ld  p, 4(p))
  localparam int    NODES = 40;

  initial begin
    addr_t node [NODES];
    int    hits_fast = 0, hits_mem = 0, lds_hits = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ================= phase 1: strided array =================
    for (int k = 0; k < 24; k++) begin
      addr_t a;
      a = 32'h0100_0000 + 32'(k * 3 * 64) + 32'h8;
      l1_miss(PC_A, a);
      wait_line(a);
      if (k == 0) check(lat[line_of(a)] == 115, $sformatf("uncontended miss latency %0d, want 115", lat[line_of(a)]));
      if (k < 3) check(src[line_of(a)] == 0, "first misses come from memory");
      if (k >= 4) check(src[line_of(a)] != 0, $sformatf("strided line %0d from a buffer", k));
      if (src[line_of(a)] == 1) begin
        hits_fast++;
        check(lat[line_of(a)] == 10, $sformatf("buffer hit latency %0d, want 10", lat[line_of(a)]));
      end
      repeat ((k % 3 == 0) ? 150 : 20) @(negedge clk);
      commit(PC_A, a - 32'h8, a, 32'(k));
    end
    check(hits_fast > 4, $sformatf("timely strided hits: %0d", hits_fast));

    // ================= phase 2: linked list =================
    for (int i = 0; i < NODES; i++) node[i] = 32'h0200_0000 + 32'(((i * 37) % 101) * 4096) + 32'(i * 64) % 32'd2048;
    for (int i = 0; i < NODES; i++) begin
      mem.put_word(node[i], 32'hD000_0000 + 32'(i));
      mem.put_word(node[i] + 4, (i + 1 < NODES) ? node[i + 1] : 32'h0);
    end
    for (int i = 0; i < NODES; i++) begin
      addr_t nx;
      l1_miss(PC_D, node[i]);
      wait_line(node[i]);
      if (src[line_of(node[i])] != 0) lds_hits++;
      else hits_mem++;
      nx = (i + 1 < NODES) ? node[i + 1] : 32'h0;
      commit(PC_D, node[i], node[i], 32'hD000_0000 + 32'(i));
      commit(PC_N, node[i], node[i] + 4, nx);
      repeat ((i % 4 == 1) ? 100 : 250) @(negedge clk);
    end
    check(lds_hits > NODES / 2, $sformatf("list nodes from LDS buffers: %0d of %0d", lds_hits, NODES));

    // ================= phase 3: burst of independent misses =================
    fork
      for (int k = 0; k < 40; k++) l1_miss(32'h0040_0300 + 32'((k % 5) * 4), 32'h0300_0000 + 32'(k * 8192));
    join
    repeat (1500) @(negedge clk);
    check(pend.size() == 0, $sformatf("%0d demands never answered", pend.size()));

    // ================= phase 4: strided walk into lines the L2 already holds =================
    for (int k = 10; k < 20; k++) l2[laddr_t'(26'h0300_000 + k)] = 1;
    for (int k = 0; k < 30; k++) begin
      addr_t a;
      a = {26'h0300_000 + 26'(k), 6'h10};
      l1_miss(32'h0040_0400, a);
      if (!l2.exists(line_of(a))) wait_line(a);
      repeat (150) @(negedge clk);
    end
    check(pend.size() == 0, "phase 4 answered");

    // ================= mechanisms =================
    check(n_skip > 0,  $sformatf("prefetches skipped (line in L2): %0d", n_skip));
    check(n_dm > 0,    $sformatf("demand misses: %0d", n_dm));
    check(n_as > 0,    $sformatf("strided allocations: %0d", n_as));
    check(n_al > 0,    $sformatf("LDS allocations: %0d", n_al));
    check(n_pf > 0,    $sformatf("prefetches: %0d", n_pf));
    check(n_pb > 0,    $sformatf("buffer hits: %0d", n_pb));
    check(n_late > 0,  $sformatf("late buffer hits: %0d", n_late));
    check(n_ct > 0,    $sformatf("CT writes: %0d", n_ct));
    check(n_stall > 0, $sformatf("stalls: %0d", n_stall));
    check(n_beats > 0 && n_beats % 4 == 0, $sformatf("bus beats: %0d", n_beats));
    $display("skipped=%0d", n_skip);
    $display("demand=%0d alloc_stride=%0d alloc_lds=%0d prefetch=%0d hit=%0d late=%0d ct=%0d stall=%0d beats=%0d cycles=%0d",
             n_dm, n_as, n_al, n_pf, n_pb, n_late, n_ct, n_stall, n_beats, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
