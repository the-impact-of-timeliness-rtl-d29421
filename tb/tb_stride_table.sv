// tb_stride_table: self-checking test of the per-PC stride detector.
//
// Drives L2 misses from 8 load PCs that map to different table entries, each
// PC switching at random between a constant stride and random jumps, and
// compares the strided verdict, stride and next line address with a reference
// model that counts, per PC, how many successive equal non-zero strides were
// seen (strided from the second equal stride on). A PC that aliases onto a used
// entry must restart training.
module tb_stride_table;
  import pf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    miss_valid = 1'b0, strided;
  addr_t   miss_pc = '0;
  laddr_t  miss_laddr = '0, next_laddr;
  stride_t stride;

  stride_table dut (.*);

  int checks = 0, failures = 0, nstrided = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: per PC last line, last stride, run of equal strides
  laddr_t  r_last [addr_t];
  longint  r_str  [addr_t];
  int      r_run  [addr_t];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic miss(input addr_t pc, input laddr_t a);
    bit     exp;
    longint d;
    @(negedge clk);
    miss_valid = 1'b1; miss_pc = pc; miss_laddr = a;
    if (!r_last.exists(pc)) begin
      r_last[pc] = a; r_str[pc] = 0; r_run[pc] = 0;
    end else begin
      d = longint'(signed'(STRIDE_W'(a - r_last[pc])));
      if (d != 0) begin
        if (r_run[pc] > 0 && d == r_str[pc]) r_run[pc]++;
        else begin r_str[pc] = d; r_run[pc] = 1; end
        r_last[pc] = a;
      end
    end
    exp = r_run.exists(pc) && r_run[pc] >= 2;
    #1;
    check(strided == exp, $sformatf("pc %h line %h strided=%0b want %0b", pc, a, strided, exp));
    if (exp) begin
      nstrided++;
      check(longint'(stride) == r_str[pc], "stride value");
      check(next_laddr == a + laddr_t'(r_str[pc]), "next line address");
    end
  endtask

  initial begin
    laddr_t cur [8];
    int     st  [8];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // directed: 100, 103, 106 -> strided on the third miss
    miss(32'h0000_1000, 26'd100);
    miss(32'h0000_1000, 26'd103);
    miss(32'h0000_1000, 26'd106);
    check(strided && stride == 3 && next_laddr == 26'd109, "directed stride 3");
    // a different PC on the same entry (same index bits) replaces it
    miss(32'h0010_1000, 26'd50);
    r_last.delete(32'h0000_1000); r_str.delete(32'h0000_1000); r_run.delete(32'h0000_1000);
    miss(32'h0000_1000, 26'd109);
    check(!strided, "aliased PC restarts");
    // random mix
    for (int p = 0; p < 8; p++) begin cur[p] = laddr_t'($urandom); st[p] = int'($urandom_range(1, 9)) - 5; end
    for (int n = 0; n < 3000; n++) begin
      int p;
      p = $urandom_range(0, 7);
      if ($urandom_range(0, 9) == 0) begin
        cur[p] = laddr_t'($urandom);
        st[p]  = int'($urandom_range(0, 16)) - 8;
      end else begin
        cur[p] = cur[p] + laddr_t'(st[p]);
      end
      miss(32'h0000_2000 + 32'(p * 4), cur[p]);
    end
    @(negedge clk) miss_valid = 1'b0;
    check(nstrided > 1000, $sformatf("strided verdicts seen: %0d", nstrided));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
