// corr_table: Correlation Table (CT) of the LDS detector.
//
// Maps the PC of a load that dereferences a linked-structure node to two
// displacements: pdisp, where the node's "next" pointer sits (the displacement
// of the load that produced the pointer), and cdisp, the displacement of this
// consuming load itself. It is written when the producer window sees a load
// consume a recently loaded pointer, and probed with the PC of every L2 miss: a
// hit means the miss was a node access, at node base = miss address - cdisp,
// and an LDS stream buffer can follow the link at node base + pdisp.
//
// 256 entries as in the design's configuration, direct-mapped on PC bits with a
// PC tag (the organisation is this implementation's choice). One write and one
// probe per cycle; the probe is combinational and sees the table before a
// same-cycle write. Reset invalidates all entries.
module corr_table
  import pf_pkg::*;
#(
  parameter int unsigned ENTRIES = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_valid,
  input  addr_t wr_pc,
  input  doff_t wr_pdisp,
  input  doff_t wr_cdisp,
  input  logic  rd_valid,
  input  addr_t rd_pc,
  output logic  rd_hit,
  output doff_t rd_pdisp,
  output doff_t rd_cdisp
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = ADDR_W - 2 - IDX_W;

  logic             valid [ENTRIES];
  logic [TAG_W-1:0] tag   [ENTRIES];
  doff_t            pd    [ENTRIES];
  doff_t            cd    [ENTRIES];

  logic [IDX_W-1:0] ridx, widx;
  assign ridx = rd_pc[2 +: IDX_W];
  assign widx = wr_pc[2 +: IDX_W];

  assign rd_hit = rd_valid && valid[ridx] && tag[ridx] == rd_pc[ADDR_W-1 -: TAG_W];
  assign rd_pdisp = pd[ridx];
  assign rd_cdisp = cd[ridx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid[i] <= 1'b0;
        tag[i]   <= '0;
        pd[i]    <= '0;
        cd[i]    <= '0;
      end
    end else if (wr_valid) begin
      valid[widx] <= 1'b1;
      tag[widx]   <= wr_pc[ADDR_W-1 -: TAG_W];
      pd[widx]    <= wr_pdisp;
      cd[widx]    <= wr_cdisp;
    end
  end
endmodule
