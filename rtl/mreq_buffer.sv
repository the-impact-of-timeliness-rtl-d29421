// mreq_buffer: memory request buffer and return data bus between main memory and L2.
//
// Every line request to main memory, demand miss or prefetch, takes one of the
// ENTRIES (16) entries. The address goes to the memory devices at once (the
// address path has unbounded bandwidth); the devices answer after a constant
// latency, and the line then waits in its entry for the single return data bus.
// The bus is BUS_BYTES (16) bytes wide and moves one beat per 7.5 cycles, so a
// 64-byte line holds it for 30 cycles; with the 85-cycle address+device latency
// an uncontended miss takes 115 cycles from request to fill. When the bus frees
// up, a waiting demand line goes first (oldest demand first); prefetched lines
// follow in the order they were requested.
//
// Interface: a request is accepted in the cycle req_valid && req_ready; demand
// requests need one free entry, prefetches leave DEMAND_RESERVE entries free
// for demands (the reserve is this implementation's choice). mem_req_* leaves in
// the same cycle, tagged with the entry index; mem_resp_* returns the line with
// that index. The line is then sent as BEATS beats on beat_*; in the cycle of
// the last beat fill_* presents the whole line with the request's tag.
// The 7.5-cycle beat is realised as alternating 8- and 7-cycle beats (beats end
// 8, 15, 23 and 30 cycles after the bus is granted).
module mreq_buffer
  import pf_pkg::*;
#(
  parameter int unsigned ENTRIES        = 16,
  parameter int unsigned DEMAND_RESERVE = 1,
  parameter int unsigned HALF_CYC_BEAT  = 15,   // 7.5 cycles per 16-byte beat, in half cycles
  parameter int unsigned TAG_W          = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // requests from the L2 / prefetcher side
  input  logic                       req_valid,
  input  laddr_t                     req_laddr,
  input  logic                       req_demand,
  input  logic [TAG_W-1:0]           req_tag,
  output logic                       req_ready,
  // memory devices
  output logic                       mem_req_valid,
  output logic [$clog2(ENTRIES)-1:0] mem_req_idx,
  output laddr_t                     mem_req_laddr,
  input  logic                       mem_resp_valid,
  input  logic [$clog2(ENTRIES)-1:0] mem_resp_idx,
  input  line_t                      mem_resp_data,
  // return data bus
  output logic                       beat_valid,
  output beat_t                      beat_data,
  output logic                       fill_valid,
  output laddr_t                     fill_laddr,
  output line_t                      fill_data,
  output logic                       fill_demand,
  output logic [TAG_W-1:0]           fill_tag,
  output logic                       busy
);
  localparam int unsigned IW    = $clog2(ENTRIES);
  localparam int unsigned LINE_HALF = BEATS * HALF_CYC_BEAT;
  localparam int unsigned BUS_CYC   = (LINE_HALF + 1) / 2;
  localparam int unsigned CW    = $clog2(BUS_CYC + 1);

  typedef struct packed {
    logic             valid;
    logic             ready;
    logic             demand;
    laddr_t           laddr;
    logic [TAG_W-1:0] tag;
    logic [31:0]      seq;
  } ent_t;

  ent_t        ent   [ENTRIES];
  line_t       edata [ENTRIES];
  logic [31:0] seq_cnt;

  // ---------------- allocation ----------------
  logic          have_free;
  logic [IW-1:0] free_idx;
  int unsigned   nfree;
  always_comb begin
    have_free = 1'b0; free_idx = '0; nfree = 0;
    for (int i = 0; i < ENTRIES; i++)
      if (!ent[i].valid) begin
        nfree = nfree + 1;
        if (!have_free) begin have_free = 1'b1; free_idx = IW'(i); end
      end
  end
  assign req_ready = req_demand ? have_free : nfree > DEMAND_RESERVE;

  logic accept;
  assign accept        = req_valid && req_ready;
  assign mem_req_valid = accept;
  assign mem_req_idx   = free_idx;
  assign mem_req_laddr = req_laddr;

  // ---------------- bus arbitration ----------------
  logic [CW-1:0] bcnt;        // cycles of the current transfer, 0 = idle
  logic          last_cyc;
  assign busy     = bcnt != '0;
  assign last_cyc = bcnt == CW'(BUS_CYC);

  logic          sel_valid;
  logic [IW-1:0] sel_idx;
  always_comb begin
    logic found_d, found_p;
    logic [IW-1:0] di, pi;
    found_d = 1'b0; found_p = 1'b0; di = '0; pi = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].valid && (ent[i].ready || (mem_resp_valid && mem_resp_idx == IW'(i)))) begin
        if (ent[i].demand) begin
          if (!found_d || ent[i].seq < ent[di].seq) begin found_d = 1'b1; di = IW'(i); end
        end else begin
          if (!found_p || ent[i].seq < ent[pi].seq) begin found_p = 1'b1; pi = IW'(i); end
        end
      end
    end
    sel_valid = (found_d || found_p) && (!busy || last_cyc);
    sel_idx   = found_d ? di : pi;
  end

  line_t sel_data;
  assign sel_data = (mem_resp_valid && mem_resp_idx == sel_idx) ? mem_resp_data : edata[sel_idx];

  // ---------------- bus transfer ----------------
  line_t            bline;
  laddr_t           baddr;
  logic             bdem;
  logic [TAG_W-1:0] btag;

  always_comb begin
    beat_valid = 1'b0;
    beat_data  = '0;
    for (int k = 0; k < BEATS; k++)
      if (busy && 2 * int'(bcnt) >= (k + 1) * HALF_CYC_BEAT &&
          2 * (int'(bcnt) - 1) < (k + 1) * HALF_CYC_BEAT) begin
        beat_valid = 1'b1;
        beat_data  = bline[k*BUS_BYTES*8 +: BUS_BYTES*8];
      end
  end
  assign fill_valid  = last_cyc;
  assign fill_laddr  = baddr;
  assign fill_data   = bline;
  assign fill_demand = bdem;
  assign fill_tag    = btag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_cnt <= '0;
      bcnt    <= '0;
      bline   <= '0; baddr <= '0; bdem <= 1'b0; btag <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        ent[i]   <= '0;
        edata[i] <= '0;
      end
    end else begin
      if (mem_resp_valid) begin
        ent[mem_resp_idx].ready <= 1'b1;
        edata[mem_resp_idx]     <= mem_resp_data;
      end
      if (sel_valid) begin
        ent[sel_idx].valid <= 1'b0;
        ent[sel_idx].ready <= 1'b0;
        bline <= sel_data;
        baddr <= ent[sel_idx].laddr;
        bdem  <= ent[sel_idx].demand;
        btag  <= ent[sel_idx].tag;
        bcnt  <= CW'(1);
      end else if (last_cyc) begin
        bcnt <= '0;
      end else if (busy) begin
        bcnt <= bcnt + 1'b1;
      end
      if (accept) begin
        ent[free_idx] <= '{valid: 1'b1, ready: 1'b0, demand: req_demand,
                           laddr: req_laddr, tag: req_tag, seq: seq_cnt};
        seq_cnt <= seq_cnt + 1;
      end
    end
  end

  // The memory answers only for entries waiting for it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_resp_valid |-> ent[mem_resp_idx].valid && !ent[mem_resp_idx].ready);
endmodule
