// ppw: Potential Producer Window of the LDS (linked data structure) detector.
//
// Every committed load writes its loaded value, a potential pointer, into the
// window together with its own displacement (the offset of the loaded field
// from the load's base register), so that a pointer read from a node's "next"
// field is remembered with where that field sits in the node. A later committed
// load whose base address equals a value held in the window is taken to consume
// that pointer: the window reports a hit and the stored displacement, which the
// correlation table then records for the consumer's PC.
//
// The window holds 128 entries, searched fully associatively and replaced in
// FIFO order (the replacement order and the 16-bit displacement width are this
// implementation's choices; a zero value is never treated as a pointer).
//
// Interface: one committed load per cycle. The search (hit, hit_off) is
// combinational on ld_base against the window before this load's value is
// inserted; the insertion happens at the clock edge.
module ppw
  import pf_pkg::*;
#(
  parameter int unsigned ENTRIES = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ld_valid,
  input  addr_t ld_base,
  input  doff_t ld_disp,
  input  addr_t ld_value,
  output logic  hit,
  output doff_t hit_off
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic             valid [ENTRIES];
  addr_t            value [ENTRIES];
  doff_t            off   [ENTRIES];
  logic [IDX_W-1:0] wptr;

  always_comb begin
    hit     = 1'b0;
    hit_off = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ld_valid && valid[i] && value[i] == ld_base && !hit) begin
        hit     = 1'b1;
        hit_off = off[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        valid[i] <= 1'b0;
        value[i] <= '0;
        off[i]   <= '0;
      end
    end else if (ld_valid && ld_value != '0) begin
      valid[wptr] <= 1'b1;
      value[wptr] <= ld_value;
      off[wptr]   <= ld_disp;
      wptr        <= wptr + 1'b1;
    end
  end
endmodule
