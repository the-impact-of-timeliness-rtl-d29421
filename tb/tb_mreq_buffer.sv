// tb_mreq_buffer: self-checking test of the memory request buffer.
//
// Checks, against timings worked out by hand from the memory model (85-cycle
// address+device latency, 16-byte beats every 7.5 cycles): an uncontended
// demand fill arrives 115 cycles after the request, with beats at 8/15/23/30
// cycles after the bus grant; a demand that becomes ready while prefetches wait
// overtakes them and prefetches leave in request order; the line data and tags
// are those of the request; demand requests are refused only when all 16
// entries are in use and prefetches already when one entry is left.
module tb_mreq_buffer;
  import pf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       req_valid = 1'b0, req_demand = 1'b0, req_ready;
  laddr_t     req_laddr = '0;
  logic [7:0] req_tag = '0;
  logic       mem_req_valid, mem_resp_valid;
  logic [3:0] mem_req_idx, mem_resp_idx;
  laddr_t     mem_req_laddr;
  line_t      mem_resp_data;
  logic       beat_valid, fill_valid, fill_demand, busy;
  beat_t      beat_data;
  laddr_t     fill_laddr;
  line_t      fill_data;
  logic [7:0] fill_tag;

  mreq_buffer dut (.*);
  dram_model #(.LAT(85), .IDX_W(4)) mem (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // record fills and beats
  laddr_t f_addr[$]; longint f_time[$]; logic [7:0] f_tg[$]; logic f_dem[$];
  longint b_time[$];
  always @(negedge clk) if (rst_n) begin
    if (fill_valid) begin
      f_addr.push_back(fill_laddr); f_time.push_back(cyc); f_tg.push_back(fill_tag); f_dem.push_back(fill_demand);
      check(fill_data == mem.pattern_line(fill_laddr), $sformatf("fill data of line %h", fill_laddr));
    end
    if (beat_valid) b_time.push_back(cyc);
  end

  task automatic issue(input laddr_t a, input bit dem, input logic [7:0] tg, output longint t);
    @(negedge clk);
    req_valid = 1'b1; req_laddr = a; req_demand = dem; req_tag = tg;
    t = cyc;
    check(req_ready, $sformatf("request %h accepted", a));
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, ta, tb_, tc, td;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---- uncontended demand latency ----
    issue(26'h100, 1'b1, 8'h00, t0);
    wait (f_addr.size() == 1);
    check(f_time[0] - t0 == 115, $sformatf("demand latency %0d, want 115", f_time[0] - t0));
    check(b_time.size() == 4, "four beats");
    if (b_time.size() == 4) begin
      check(b_time[0] - t0 == 85 + 8 && b_time[1] - t0 == 85 + 15 &&
            b_time[2] - t0 == 85 + 23 && b_time[3] - t0 == 85 + 30, "beat times 8/15/23/30");
    end
    check(f_dem[0] == 1'b1 && f_addr[0] == 26'h100, "demand fill tagged");
    repeat (5) @(negedge clk);
    // ---- demand overtakes waiting prefetches ----
    issue(26'h200, 1'b0, 8'h11, ta);
    issue(26'h201, 1'b0, 8'h12, tb_);
    issue(26'h202, 1'b0, 8'h13, tc);
    issue(26'h300, 1'b1, 8'h00, td);
    wait (f_addr.size() == 5);
    check(f_addr[1] == 26'h200 && f_time[1] - ta == 115, "first prefetch uncontended");
    check(f_addr[2] == 26'h300 && f_dem[2], "demand before older prefetches");
    check(f_time[2] == f_time[1] + 30, "demand follows at once");
    check(f_addr[3] == 26'h201 && f_tg[3] == 8'h12 && f_time[3] == f_time[2] + 30, "prefetch order B");
    check(f_addr[4] == 26'h202 && f_tg[4] == 8'h13 && f_time[4] == f_time[3] + 30, "prefetch order C");
    repeat (5) @(negedge clk);
    // ---- capacity: 15 prefetches fill all but the reserve ----
    for (int i = 0; i < 15; i++) issue(26'h400 + i, 1'b0, 8'(i), t0);
    @(negedge clk);
    req_valid = 1'b1; req_demand = 1'b0; req_laddr = 26'h500;
    #1 check(!req_ready, "prefetch refused with one entry left");
    req_demand = 1'b1;
    td = cyc;
    #1 check(req_ready, "demand accepted with one entry left");
    @(negedge clk);
    req_valid = 1'b1; req_demand = 1'b1; req_laddr = 26'h501;
    #1 check(!req_ready, "demand refused when full");
    @(negedge clk);
    req_valid = 1'b0;
    wait (f_addr.size() == 5 + 16);
    begin
      int np = 0;
      for (int i = 5; i < 21; i++) begin
        if (f_dem[i]) begin
          check(f_addr[i] == 26'h500, "only demand is 500");
          // ready 85 cycles after its request, it waits at most for the transfer under way
          check(f_time[i] - td <= 115 + 30, $sformatf("demand waited %0d", f_time[i] - td));
        end else begin
          check(f_addr[i] == 26'h400 + np, "prefetch FIFO order");
          np++;
        end
      end
      check(np == 15, "all prefetches delivered");
    end
    repeat (3) @(negedge clk);
    $display("ended after %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
