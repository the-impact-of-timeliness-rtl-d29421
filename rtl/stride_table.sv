// stride_table: per-instruction stride detector trained on the L2 miss stream.
//
// A direct-mapped table indexed by the load PC records, for each PC, the line
// address of its last L2 miss, the last stride seen (in lines) and a small state
// machine. A PC is classed as strided once two successive misses of the PC show
// the same non-zero stride:
//   INIT      first miss recorded, no stride yet
//   TRANSIENT a stride was seen once
//   STEADY    the stride was confirmed; stays until a different stride is seen
// The table holds 32 entries, the size of the stream detector in the design's
// configuration. Direct mapping with a PC tag, the three-state machine and the
// unit of the stride (lines) are this implementation's choices.
//
// Interface: one training miss per cycle (miss_valid, miss_pc, miss_laddr).
// The verdict for that miss (strided, stride, first prefetch line address
// next_laddr = miss_laddr + stride) is combinational in the same cycle and uses
// the table state before the update; the entry is updated at the clock edge.
// Reset clears all entries.
module stride_table
  import pf_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    miss_valid,
  input  addr_t   miss_pc,
  input  laddr_t  miss_laddr,
  output logic    strided,
  output stride_t stride,
  output laddr_t  next_laddr
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = ADDR_W - 2 - IDX_W;

  typedef enum logic [1:0] {ST_INIT, ST_TRANSIENT, ST_STEADY} st_e;
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    laddr_t            last;
    stride_t           stride;
    st_e               state;
  } entry_t;

  entry_t tbl [ENTRIES];

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  entry_t           cur, nxt;
  stride_t          delta;

  assign idx   = miss_pc[2 +: IDX_W];
  assign tag   = miss_pc[ADDR_W-1 -: TAG_W];
  assign cur   = tbl[idx];
  assign delta = stride_t'(miss_laddr - cur.last);

  always_comb begin
    nxt = cur;
    if (!cur.valid || cur.tag != tag) begin
      nxt = '{valid: 1'b1, tag: tag, last: miss_laddr, stride: '0, state: ST_INIT};
    end else if (delta != '0) begin
      nxt.last = miss_laddr;
      unique case (cur.state)
        ST_INIT: begin
          nxt.stride = delta;
          nxt.state  = ST_TRANSIENT;
        end
        ST_TRANSIENT, ST_STEADY: begin
          if (delta == cur.stride) nxt.state = ST_STEADY;
          else begin
            nxt.stride = delta;
            nxt.state  = ST_TRANSIENT;
          end
        end
        default: nxt.state = ST_INIT;
      endcase
    end
  end

  assign strided    = miss_valid && nxt.state == ST_STEADY;
  assign stride     = nxt.stride;
  assign next_laddr = miss_laddr + laddr_t'(nxt.stride);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (miss_valid) begin
      tbl[idx] <= nxt;
    end
  end
endmodule
