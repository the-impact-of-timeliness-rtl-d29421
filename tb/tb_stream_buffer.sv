// tb_stream_buffer: self-checking test of one stream buffer (DEPTH = 2).
//
// Directed scenarios with expected values worked out by hand:
//   strided  allocation prefetches exactly one line; a hit hands the line out,
//            doubles the fetch size to 2 and two more lines are requested along
//            the stride; a hit on a line still in flight is delivered on late_*
//            when it arrives; reallocation drops the old lines.
//   LDS      with the next field in the missing line, the buffer waits for the
//            demand fill, reads the pointer, prefetches the next node; the
//            pointer read from that node is followed after a hit; a next field
//            in a different line causes a second prefetch of that line; a null
//            pointer ends the stream; for a load reading the node at a non-zero
//            displacement, the next link and the next line to use are both
//            taken from the next node's base.
module tb_stream_buffer;
  import pf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     alloc_valid = 1'b0;
  sb_mode_e alloc_mode = SB_STRIDE;
  addr_t    alloc_pc = '0, alloc_miss_addr = '0;
  laddr_t   alloc_next_laddr = '0;
  stride_t  alloc_stride = '0;
  doff_t    alloc_pdisp = '0, alloc_cdisp = '0;
  logic     active;
  addr_t    pc;
  sb_mode_e mode;
  laddr_t   lk_laddr = '0;
  logic     hit, hit_ready, lk_take = 1'b0;
  line_t    hit_data;
  logic     pf_req_valid, pf_grant = 1'b0, pf_skip = 1'b0, chk_hit;
  laddr_t   chk_laddr = '0;
  laddr_t   pf_req_laddr;
  logic [0:0] pf_req_slot, fill_slot = '0;
  logic     fill_valid = 1'b0, fill_mine = 1'b0;
  laddr_t   fill_laddr = '0;
  line_t    fill_data = '0;
  logic     late_valid;
  laddr_t   late_laddr;
  line_t    late_data;

  stream_buffer dut (.*);

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
  function automatic line_t with_word(line_t l, addr_t a, addr_t v);
    l[a[5:2]*32 +: 32] = v;
    return l;
  endfunction

  // grant the pending request now; return its line and slot
  task automatic grant(output laddr_t a, output logic [0:0] s);
    @(negedge clk);
    check(pf_req_valid, "request pending");
    a = pf_req_laddr; s = pf_req_slot;
    pf_grant = 1'b1;
    @(negedge clk);
    pf_grant = 1'b0;
  endtask

  task automatic fill(input laddr_t a, input line_t d, input bit mine, input logic [0:0] s,
                      output bit late);
    @(negedge clk);
    fill_valid = 1'b1; fill_laddr = a; fill_data = d; fill_mine = mine; fill_slot = s;
    #1 late = late_valid;
    if (late_valid) check(late_laddr == a && late_data == d, "late data");
    @(negedge clk);
    fill_valid = 1'b0; fill_mine = 1'b0;
  endtask

  task automatic lookup(input laddr_t a, input bit take, output bit h, output bit r, output line_t d);
    @(negedge clk);
    lk_laddr = a; lk_take = take;
    #1 h = hit; r = hit_ready; d = hit_data;
    @(negedge clk);
    lk_take = 1'b0;
  endtask

  task automatic alloc(input sb_mode_e m, input addr_t miss, input laddr_t nxt, input stride_t st, input doff_t pd,
                       input doff_t cd = '0);
    @(negedge clk);
    alloc_valid = 1'b1; alloc_mode = m; alloc_pc = 32'h400100; alloc_miss_addr = miss;
    alloc_next_laddr = nxt; alloc_stride = st; alloc_pdisp = pd; alloc_cdisp = cd;
    @(negedge clk);
    alloc_valid = 1'b0;
  endtask

  task automatic no_request(input string what);
    @(negedge clk);
    check(!pf_req_valid, what);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    laddr_t a, a2;
    logic [0:0] s, s2;
    bit h, r, late;
    line_t d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    no_request("idle after reset");
    // ================= strided =================
    alloc(SB_STRIDE, 32'h0000_1A40, 26'd110, 16'sd2, '0);
    check(active && mode == SB_STRIDE, "allocated strided");
    grant(a, s);
    check(a == 26'd110, "first prefetch is next line");
    no_request("fetch size 1: one prefetch on allocation");
    lookup(26'd110, 1'b0, h, r, d);
    check(h && !r, "hit on in-flight line");
    fill(26'd110, pat(26'd110), 1'b1, s, late);
    check(!late, "nobody waits, line stored");
    lookup(26'd110, 1'b1, h, r, d);
    check(h && r && d == pat(26'd110), "hit on present line gives data");
    lookup(26'd110, 1'b0, h, r, d);
    check(!h, "consumed line leaves the buffer");
    grant(a, s);
    check(a == 26'd112, "after hit: next stride line");
    grant(a2, s2);
    check(a2 == 26'd114 && s2 != s, "fetch size doubled: second line");
    no_request("buffer full");
    lookup(26'd112, 1'b1, h, r, d);
    check(h && !r, "demand on in-flight line");
    fill(26'd112, pat(26'd112), 1'b1, s, late);
    check(late, "in-flight line passed on when it arrives");
    grant(a, s);
    check(a == 26'd116, "refill after late hit");
    // second tag port sees present and in-flight lines, not freed ones
    @(negedge clk);
    chk_laddr = 26'd114; #1 check(chk_hit, "check port: in-flight line");
    chk_laddr = 26'd116; #1 check(chk_hit, "check port: just requested line");
    chk_laddr = 26'd112; #1 check(!chk_hit, "check port: handed-out line");
    // reallocation drops old lines
    alloc(SB_STRIDE, 32'h0000_9000, 26'd500, -16'sd1, '0);
    lookup(26'd114, 1'b0, h, r, d);
    check(!h, "old stream dropped");
    fill(26'd114, pat(26'd114), 1'b1, s2, late);
    check(!late, "stale fill ignored");
    grant(a, s);
    check(a == 26'd500, "new stream, negative stride starts at its next line");
    fill(26'd116, pat(26'd116), 1'b1, ~s, late);   // stale line of the old stream
    fill(26'd500, pat(26'd500), 1'b1, s, late);
    lookup(26'd500, 1'b1, h, r, d);
    check(h && r, "new stream line present");
    // the candidate 499 is held elsewhere: skip it, the budget is used up
    @(negedge clk);
    check(pf_req_valid && pf_req_laddr == 26'd499, "candidate 499");
    pf_skip = 1'b1;
    @(negedge clk);
    pf_skip = 1'b0;
    grant(a2, s2);
    check(a2 == 26'd498, "skip steps past the line; next one fetched");
    no_request("fetch size 2 used by one skip and one prefetch");
    // ================= LDS, next field in the missing line =================
    // node at 0x1000, next field at +4; next node at 0x2000, then 0x3030, then null
    alloc(SB_LDS, 32'h0000_1000, '0, '0, 16'sd4);
    check(mode == SB_LDS, "allocated LDS");
    no_request("old lines still in flight");
    fill(26'd498, pat(26'd498), 1'b1, s2, late);   // stale line of the strided stream
    check(!late, "stale lines dropped");
    no_request("waits for the demand line");
    fill(26'h40, with_word(pat(26'h40), 32'h1004, 32'h2000), 1'b0, '0, late);   // demand fill
    grant(a, s);
    check(a == 26'h80, "next node prefetched");
    no_request("fetch size 1");
    fill(26'h80, with_word(pat(26'h80), 32'h2004, 32'h3030), 1'b1, s, late);
    no_request("throttled until a hit");
    lookup(26'h80, 1'b1, h, r, d);
    check(h && r && d == with_word(pat(26'h80), 32'h2004, 32'h3030), "node line hit");
    grant(a, s);
    check(a == 26'hC0, "pointer read from the prefetched node is followed");
    no_request("waits for that node");
    fill(26'hC0, with_word(pat(26'hC0), 32'h3034, 32'h0), 1'b1, s, late);
    lookup(26'hC0, 1'b1, h, r, d);
    check(h && r, "second node hit");
    no_request("null pointer ends the stream");
    // ================= LDS, next field in another line =================
    // node at 0x4000 with next at +0x44 (line 0x101); next node 0x5000 (next at 0x5044)
    alloc(SB_LDS, 32'h0000_4000, '0, '0, 16'sh44);
    grant(a, s);
    check(a == 26'h101, "line holding the next field prefetched");
    fill(26'h101, with_word(pat(26'h101), 32'h4044, 32'h5000), 1'b1, s, late);
    lookup(26'h101, 1'b1, h, r, d);
    check(h && r, "next-field line hit");
    grant(a, s);
    check(a == 26'h140, "next node line");
    grant(a2, s2);
    check(a2 == 26'h141, "and its next-field line");
    fill(26'h140, pat(26'h140), 1'b1, s, late);
    fill(26'h141, pat(26'h141), 1'b1, s2, late);
    // ================= LDS, load reading the node at +0x48 =================
    // node at 0x6000, next at +4, the missing load reads 0x6048 (line 0x181);
    // next node 0x7000: the load will touch 0x7048 (line 0x1C1), next at 0x7004
    alloc(SB_LDS, 32'h0000_6048, '0, '0, 16'sh4, 16'sh48);
    grant(a, s);
    check(a == 26'h180, "line of the next field, at node base + 4");
    fill(26'h180, with_word(pat(26'h180), 32'h6004, 32'h7000), 1'b1, s, late);
    lookup(26'h180, 1'b1, h, r, d);
    check(h && r, "next-field line hit");
    grant(a, s);
    check(a == 26'h1C1, "line the load uses in the next node");
    grant(a2, s2);
    check(a2 == 26'h1C0, "line of the next node's next field");
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
