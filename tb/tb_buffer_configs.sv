// tb_buffer_configs: the prefetcher in the configurations that are compared
// for the design: the hybrid with 4, 8 or 16 buffers of depths 1, 2, 4, 8, and
// strided-only and LDS-only stream buffers. Each runs the three workload_lane
// kernels: A regular sweeps of 6 arrays, B long scattered lists, C short
// hash-bucket lists.
// All lanes run side by side from the same clock, each with its own memory.
// For every configuration it prints the share of accesses served by stream
// buffers and the cycles per kernel. Checks:
//   * every lane's own checks pass (data equal to memory, every demand
//     answered), so every configuration is functionally correct;
//   * kernel A has 6 concurrent streams: 4 buffers cannot hold them all and
//     serve fewer of its accesses than 8 or 16 buffers;
//   * with 16 buffers, kernel A is mostly (> 80 %) served at every depth, and
//     kernel B, a single stream at a time, at every depth > 1 (> 50 %);
//   * strided-only buffers serve kernel A as the hybrid does and no list node;
//     LDS-only buffers serve the long lists as the hybrid does, the short
//     lists at least as well (the hybrid's strided preference can claim a list
//     PC whose misses happened to look strided) and no sweep line: the
//     hybrid covers both program classes.
// A watchdog ends a run that hangs.
module tb_buffer_configs;
  import pf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 10;
  localparam int CFG_NUM   [NCFG] = '{4, 8, 16, 16, 16, 16, 8, 16, 16, 16};
  localparam int CFG_DEPTH [NCFG] = '{2, 2,  1,  2,  4,  8, 8,  2,  2,  4};
  localparam bit CFG_STR   [NCFG] = '{1, 1,  1,  1,  1,  1, 1,  1,  0,  0};
  localparam bit CFG_LDS   [NCFG] = '{1, 1,  1,  1,  1,  1, 1,  0,  1,  1};
  localparam int HYB = 3;   // 16 x 2 hybrid, the default

  logic   done      [NCFG];
  int     lchecks   [NCFG], lfailures [NCFG];
  int     sb_served [NCFG][3], accesses [NCFG][3];
  longint cycles    [NCFG][3];

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    logic   l_done;
    int     l_checks, l_failures;
    int     l_sb [3], l_acc [3];
    longint l_cyc [3];
    workload_lane #(.NUM_SB(CFG_NUM[g]), .SB_DEPTH(CFG_DEPTH[g]),
                    .EN_STRIDE(CFG_STR[g]), .EN_LDS(CFG_LDS[g])) lane (
      .clk, .done(l_done), .checks(l_checks), .failures(l_failures),
      .sb_served(l_sb), .accesses(l_acc), .cycles(l_cyc));
    assign done[g]      = l_done;
    assign lchecks[g]   = l_checks;
    assign lfailures[g] = l_failures;
    for (genvar k = 0; k < 3; k++) begin : kern
      assign sb_served[g][k] = l_sb[k];
      assign accesses[g][k]  = l_acc[k];
      assign cycles[g][k]    = l_cyc[k];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_done();
    foreach (done[g]) if (done[g] !== 1'b1) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    check(sb_served[7][0] == sb_served[HYB][0] && sb_served[7][1] == 0 && sb_served[7][2] == 0,
          "strided-only: sweeps as the hybrid, no list nodes");
    check(sb_served[8][0] == 0 && sb_served[8][1] == sb_served[HYB][1] && sb_served[8][2] >= sb_served[HYB][2],
          "LDS-only: lists as the hybrid, no sweep lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do @(posedge clk); while (!all_done());
    $display("type     buffers depth |  A served  cycles |  B served  cycles |  C served  cycles");
    for (int g = 0; g < NCFG; g++) begin
      $display("%8s %7d %5d | %3d/%3d %7d | %3d/%3d %7d | %3d/%3d %7d",
               !CFG_LDS[g] ? "strided" : !CFG_STR[g] ? "LDS" : "hybrid", CFG_NUM[g], CFG_DEPTH[g],
               sb_served[g][0], accesses[g][0], cycles[g][0],
               sb_served[g][1], accesses[g][1], cycles[g][1],
               sb_served[g][2], accesses[g][2], cycles[g][2]);
      checks += lchecks[g];
      check(lfailures[g] == 0, $sformatf("lane %0d x %0d: %0d failures", CFG_NUM[g], CFG_DEPTH[g], lfailures[g]));
    end
    check(sb_served[0][0] < sb_served[1][0] && sb_served[0][0] < sb_served[3][0],
          "4 buffers serve fewer of 6 streams than 8 or 16");
    for (int g = 2; g <= 5; g++) begin
      check(sb_served[g][0] * 100 > accesses[g][0] * 80, $sformatf("16 x %0d: kernel A mostly served", CFG_DEPTH[g]));
      if (CFG_DEPTH[g] > 1)
        check(sb_served[g][1] * 100 > accesses[g][1] * 50, $sformatf("16 x %0d: kernel B mostly served", CFG_DEPTH[g]));
    end
    check(sb_served[7][0] == sb_served[HYB][0] && sb_served[7][1] == 0 && sb_served[7][2] == 0,
          "strided-only: sweeps as the hybrid, no list nodes");
    check(sb_served[8][0] == 0 && sb_served[8][1] == sb_served[HYB][1] && sb_served[8][2] >= sb_served[HYB][2],
          "LDS-only: lists as the hybrid, no sweep lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
