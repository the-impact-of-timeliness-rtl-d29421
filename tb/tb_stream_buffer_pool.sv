// tb_stream_buffer_pool: self-checking test of the pool of 16 stream buffers.
//
// Allocates 16 strided streams (one per load PC) and checks: allocation takes
// unused buffers first; the 16 first prefetches are granted round robin, one per
// cycle; fills are routed back by tag and looked up across all buffers; hits
// update an LRU order kept by a reference list in the testbench, and a 17th PC
// replaces the least recently used buffer; a PC that already owns a buffer gets
// the same buffer back; strided candidates held by the L2 or another buffer are
// skipped; a hit on an in-flight line is passed on at arrival; an
// LDS buffer reads its pointer from a demand fill seen on the fill bus.
module tb_stream_buffer_pool;
  import pf_pkg::*;

  localparam int NUM = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       alloc_valid = 1'b0;
  sb_mode_e   alloc_mode = SB_STRIDE;
  addr_t      alloc_pc = '0, alloc_miss_addr = '0;
  laddr_t     alloc_next_laddr = '0;
  stride_t    alloc_stride = 16'sd1;
  doff_t      alloc_pdisp = '0, alloc_cdisp = '0;
  logic       lk_valid = 1'b0, lk_take = 1'b0, hit, hit_ready;
  laddr_t     lk_laddr = '0;
  line_t      hit_data;
  logic       pf_req_valid, pf_grant = 1'b0, l2_probe_hit = 1'b0;
  laddr_t     l2_probe_laddr;
  logic       pf_skipped;
  int         n_skip = 0;
  always @(negedge clk) n_skip += int'(pf_skipped);
  laddr_t     in_l2 = '1;      // one line the L2 model holds
  always_comb l2_probe_hit = l2_probe_laddr == in_l2;
  laddr_t     pf_req_laddr;
  logic [7:0] pf_req_tag;
  logic       fill_valid = 1'b0, fill_demand = 1'b0;
  laddr_t     fill_laddr = '0;
  line_t      fill_data = '0;
  logic [7:0] fill_tag = '0;
  logic       late_valid;
  laddr_t     late_laddr;
  line_t      late_data;
  logic [NUM-1:0] active, lds;

  stream_buffer_pool dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic line_t pat(laddr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = {6'(w), a};
    return l;
  endfunction

  int lru[$];              // front = most recently used buffer
  task automatic touch(input int b);
    foreach (lru[i]) if (lru[i] == b) begin lru.delete(i); break; end
    lru.push_front(b);
  endtask

  task automatic alloc(input addr_t pcv, input sb_mode_e m, input addr_t miss, input laddr_t nxt, input doff_t off);
    @(negedge clk);
    alloc_valid = 1'b1; alloc_pc = pcv; alloc_mode = m; alloc_miss_addr = miss;
    alloc_next_laddr = nxt; alloc_pdisp = off; alloc_cdisp = '0;
    @(negedge clk);
    alloc_valid = 1'b0;
  endtask

  task automatic fill(input laddr_t a, input line_t d, input bit dem, input logic [7:0] t);
    @(negedge clk);
    fill_valid = 1'b1; fill_laddr = a; fill_data = d; fill_demand = dem; fill_tag = t;
    @(negedge clk);
    fill_valid = 1'b0;
  endtask

  task automatic lookup(input laddr_t a, input bit take, output bit h, output bit r, output line_t d);
    @(negedge clk);
    lk_valid = 1'b1; lk_laddr = a; lk_take = take;
    #1 h = hit; r = hit_ready; d = hit_data;
    @(negedge clk);
    lk_valid = 1'b0; lk_take = 1'b0;
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    laddr_t     ga [NUM];
    logic [7:0] gt [NUM];
    bit h, r;
    line_t d;
    int victim;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 16 streams, stream i at lines 1000*i+1, +2, ...
    for (int i = 0; i < NUM; i++) begin
      alloc(32'h400000 + 32'(i * 4), SB_STRIDE, '0, laddr_t'(1000 * i + 1), '0);
      touch(i);
    end
    check(active == '1, "all buffers in use");
    // round-robin: one grant per cycle, buffers 0..15 in turn
    @(negedge clk);
    pf_grant = 1'b1;
    for (int i = 0; i < NUM; i++) begin
      #1;
      check(pf_req_valid, "request");
      ga[i] = pf_req_laddr; gt[i] = pf_req_tag;
      check(pf_req_tag[4:1] == 4'(i), $sformatf("grant %0d goes to buffer %0d", i, pf_req_tag[4:1]));
      check(ga[i] == laddr_t'(1000 * i + 1), "first line of each stream");
      @(negedge clk);
    end
    pf_grant = 1'b0;
    #1 check(!pf_req_valid, "each buffer issued exactly one");
    for (int i = 0; i < NUM; i++) fill(ga[i], pat(ga[i]), 1'b0, gt[i]);
    // hits in a shuffled order update the LRU order
    for (int k = 0; k < NUM; k++) begin
      int i;
      i = (k * 7 + 3) % NUM;
      if (i == 5) continue;
      lookup(laddr_t'(1000 * i + 1), 1'b1, h, r, d);
      check(h && r && d == pat(laddr_t'(1000 * i + 1)), $sformatf("hit in buffer %0d", i));
      touch(i);
    end
    // the 17th PC replaces the least recently used buffer (5 was never hit)
    victim = lru[$];
    check(victim == 5, "reference LRU is buffer 5");
    alloc(32'h500000, SB_STRIDE, '0, laddr_t'(77777), '0);
    touch(victim);
    lookup(laddr_t'(1000 * 5 + 1), 1'b0, h, r, d);
    check(!h, "LRU buffer was replaced");
    lookup(laddr_t'(1000 * 6 + 1), 1'b0, h, r, d);
    check(!h, "buffer 6 line was consumed earlier");
    // drain the pending requests (buffer 5 new stream + two refills per hit buffer)
    begin
      int n = 0; bit saw_new = 0;
      laddr_t pa [$]; logic [7:0] pt [$];
      @(negedge clk);
      pf_grant = 1'b1;
      while (pf_req_valid && n < 100) begin
        if (pf_req_laddr == laddr_t'(77777)) begin
          saw_new = 1;
          check(pf_req_tag[4:1] == 4'(victim), "new stream in the victim buffer");
        end
        pa.push_back(pf_req_laddr); pt.push_back(pf_req_tag);
        n++;
        @(negedge clk);
      end
      pf_grant = 1'b0;
      check(saw_new, "new stream prefetches");
      check(n == 1 + 2 * (NUM - 1), $sformatf("%0d prefetches after the hits", n));
      // a demand on an in-flight line comes out at arrival
      lookup(pa[0], 1'b1, h, r, d);
      check(h && !r, "in-flight hit");
      @(negedge clk);
      fill_valid = 1'b1; fill_laddr = pa[0]; fill_data = pat(pa[0]); fill_demand = 1'b0; fill_tag = pt[0];
      #1 check(late_valid && late_laddr == pa[0] && late_data == pat(pa[0]), "late line passed on");
      @(negedge clk);
      fill_valid = 1'b0;
      for (int i = 1; i < pa.size(); i++) fill(pa[i], pat(pa[i]), 1'b0, pt[i]);
    end
    // same PC gets its buffer back
    alloc(32'h400000 + 32'(9 * 4), SB_STRIDE, '0, laddr_t'(9999), '0);
    @(negedge clk);
    pf_grant = 1'b1;
    begin
      int n = 0; bit ok = 0;
      while (pf_req_valid && n < 100) begin
        if (pf_req_laddr == laddr_t'(9999)) ok = pf_req_tag[4:1] == 4'd9;
        n++;
        @(negedge clk);
      end
      check(ok, "same PC reuses its buffer");
    end
    pf_grant = 1'b0;
    // filter: a strided candidate in the L2 is skipped, the next one is fetched
    in_l2 = 26'd30001;
    alloc(32'h700000, SB_STRIDE, '0, laddr_t'(30000), '0);
    begin
      laddr_t a; logic [7:0] t; bit h2, r2; line_t d2;
      @(negedge clk);
      pf_grant = 1'b1;
      #1 check(pf_req_valid && pf_req_laddr == 26'd30000, "first candidate fetched");
      a = pf_req_laddr; t = pf_req_tag;
      @(negedge clk);
      pf_grant = 1'b0;
      fill(a, pat(a), 1'b0, t);
      lookup(a, 1'b1, h2, r2, d2);
      check(h2 && r2, "hit on first line");
      @(negedge clk);
      #1 check(pf_req_valid && pf_req_laddr == 26'd30002, "line in L2 skipped");
      // a candidate already held by another buffer is skipped too
      in_l2 = '1;
      a = pf_req_laddr; t = pf_req_tag;
      pf_grant = 1'b1;
      @(negedge clk);
      pf_grant = 1'b0;
      #1 check(!pf_req_valid, "fetch size 2 used by one skip and one fetch");
      alloc(32'h710000, SB_STRIDE, '0, laddr_t'(30002), '0);
      @(negedge clk);
      #1 check(!pf_req_valid, "line held by another buffer is not fetched twice");
      fill(a, pat(a), 1'b0, t);
    end
    check(n_skip == 2, $sformatf("two candidates skipped, saw %0d", n_skip));
    // LDS buffer learns its pointer from a demand fill
    alloc(32'h600000, SB_LDS, 32'h0008_0000, '0, 16'sd8);
    check(lds != '0, "an LDS buffer is active");
    begin
      line_t l;
      l = pat(26'h2000);
      l[2*32 +: 32] = 32'h0009_0000;
      fill(26'h2000, l, 1'b1, '0);
    end
    @(negedge clk);
    #1 check(pf_req_valid && pf_req_laddr == 26'h2400, "LDS buffer follows the pointer");
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
