// tb_corr_table: self-checking test of the LDS correlation table.
//
// Writes random PCs with random displacement pairs and probes random PCs, comparing hit and
// both displacements with a reference that keeps, for each of the 256 entries, the full PC
// last written there (direct mapping on PC bits [9:2]). Probes see the table
// before a same-cycle write.
module tb_corr_table;
  import pf_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  wr_valid = 1'b0, rd_valid = 1'b0, rd_hit;
  addr_t wr_pc = '0, rd_pc = '0;
  doff_t wr_pdisp = '0, wr_cdisp = '0, rd_pdisp, rd_cdisp;

  corr_table dut (.*);

  int checks = 0, failures = 0, nhit = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  addr_t rpc [int];
  doff_t rpd [int], rcd [int];

  function automatic addr_t rand_pc();
    return 32'h0040_0000 + 32'($urandom_range(0, 1023) * 4) + (($urandom_range(0, 3) == 0) ? 32'h0010_0000 : 32'h0);
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int  ri;
      bit  eh;
      @(negedge clk);
      wr_valid = $urandom_range(0, 1);
      wr_pc    = rand_pc();
      wr_pdisp = doff_t'($urandom_range(0, 200)) - 16'sd100;
      wr_cdisp = doff_t'($urandom_range(0, 60));
      rd_valid = 1'b1;
      rd_pc    = ($urandom_range(0, 1) == 1 && n > 0) ? wr_pc : rand_pc();
      ri = int'(rd_pc[9:2]);
      eh = rpc.exists(ri) && rpc[ri] == rd_pc;
      #1;
      check(rd_hit == eh, $sformatf("hit for pc %h", rd_pc));
      if (eh) begin nhit++; check(rd_pdisp == rpd[ri] && rd_cdisp == rcd[ri], "displacements"); end
      if (wr_valid) begin rpc[int'(wr_pc[9:2])] = wr_pc; rpd[int'(wr_pc[9:2])] = wr_pdisp; rcd[int'(wr_pc[9:2])] = wr_cdisp; end
    end
    @(negedge clk) begin wr_valid = 1'b0; rd_valid = 1'b0; end
    check(nhit > 300, $sformatf("hits seen %0d", nhit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
