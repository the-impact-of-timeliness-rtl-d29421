// tb_ppw: self-checking test of the potential producer window.
//
// Inserts committed loads with distinct non-zero values and random
// displacements, searches with base addresses that are either recently loaded
// values or fresh ones, and compares hit and offset with a reference FIFO of the
// last 128 inserted values; a value pushed out by 128 newer loads must miss.
// Zero values are never inserted.
module tb_ppw;
  import pf_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  ld_valid = 1'b0, hit;
  addr_t ld_base = '0, ld_value = '0;
  doff_t ld_disp = '0, hit_off;

  ppw dut (.*);

  int checks = 0, failures = 0, nhit = 0, nmiss = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  addr_t rv[$];
  doff_t ro[$];
  int    vcount = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int    k;
      bit    exp_hit;
      doff_t exp_off;
      @(negedge clk);
      ld_valid = 1'b1;
      if (rv.size() > 0 && $urandom_range(0, 1) == 1) begin
        k = $urandom_range(0, rv.size() - 1);
        ld_base = rv[k];
      end else if (n > 200 && $urandom_range(0, 3) == 0) begin
        ld_base = 32'h8000_0000 + 32'(vcount - 140);   // pushed out long ago
      end else begin
        ld_base = 32'hC000_0000 + $urandom_range(0, 1000);
      end
      ld_value = ($urandom_range(0, 15) == 0) ? 32'h0 : 32'h8000_0000 + 32'(vcount);
      ld_disp  = doff_t'($urandom_range(0, 255)) - 16'sd128;
      exp_hit = 1'b0; exp_off = '0;
      foreach (rv[i]) if (rv[i] == ld_base) begin exp_hit = 1'b1; exp_off = ro[i]; end
      #1;
      check(hit == exp_hit, $sformatf("hit for base %h", ld_base));
      if (exp_hit) begin nhit++; check(hit_off == exp_off, "offset"); end else nmiss++;
      if (ld_value != 0) begin
        rv.push_back(ld_value); ro.push_back(ld_disp); vcount++;
        if (rv.size() > 128) begin void'(rv.pop_front()); void'(ro.pop_front()); end
      end
    end
    @(negedge clk) ld_valid = 1'b0;
    check(nhit > 500 && nmiss > 500, $sformatf("hits %0d misses %0d", nhit, nmiss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
