// tb_workload_kernels: the hybrid prefetcher at its default configuration
// (16 buffers of depth 2) on the three access-pattern kernels of workload_lane:
//   A  regular sweeps of 6 arrays in lockstep (scientific codes);
//   B  long scattered lists walked node by node (health-style);
//   C  short hash-bucket lists, 1 or 2 nodes per lookup.
// The kernels are small stand-ins for the programs, sized to run in seconds.
// Checks: the lane's own checks (every line handed out equals memory, every
// demand is answered), plus the share of accesses served by stream buffers:
// high for A (> 80 %) and B (> 50 %); for C it is only reported, short lists
// leave little to prefetch. A watchdog ends a run that hangs.
module tb_workload_kernels;
  import pf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   done;
  int     lchecks, lfailures;
  int     sb_served [3], accesses [3];
  longint cycles [3];

  workload_lane lane (.clk, .done, .checks(lchecks), .failures(lfailures),
                      .sb_served, .accesses, .cycles);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + lchecks, failures + lfailures + 1);
    $finish;
  end

  initial begin
    wait (done === 1'b1);
    $display("kernel A: %0d of %0d line accesses served by stream buffers, %0d cycles",
             sb_served[0], accesses[0], cycles[0]);
    $display("kernel B: %0d of %0d node accesses served by stream buffers, %0d cycles",
             sb_served[1], accesses[1], cycles[1]);
    $display("kernel C: %0d of %0d node accesses served by stream buffers, %0d cycles",
             sb_served[2], accesses[2], cycles[2]);
    check(sb_served[0] * 100 > accesses[0] * 80, "kernel A mostly prefetched");
    check(sb_served[1] * 100 > accesses[1] * 50, "kernel B mostly prefetched");
    check(accesses[2] > 0, "kernel C ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks + lchecks, failures + lfailures);
    $finish;
  end
endmodule
