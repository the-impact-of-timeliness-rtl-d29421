// stream_buffer: one prefetch stream buffer, strided or linked-data-structure (LDS).
//
// The buffer holds DEPTH cache lines prefetched from main memory, kept apart
// from the L2 so that wrong prefetches do not pollute it. It is allocated on an
// L2 miss of a load PC in one of two modes:
//   SB_STRIDE  the PC's misses form a strided stream; lines next, next+stride,
//              next+2*stride ... are prefetched.
//   SB_LDS     the PC dereferences nodes of a linked structure. The buffer keeps
//              pdisp (where the "next" pointer sits in a node), cdisp (where the
//              missing load reads in a node) and link_addr, the byte address of
//              the current node's next pointer (node base + pdisp, node base =
//              miss address - cdisp). When the line holding link_addr comes
//              back from memory (snooped on the fill bus, whether it was this
//              buffer's prefetch or the demand fill of the missing line), the
//              pointer p is read out of it, the line the load will touch in the
//              next node (p + cdisp) is prefetched and, if the next node's
//              pointer (p + pdisp) lies in another line, that line too. A null
//              pointer ends the stream.
// Both modes use incremental prefetching as throttle: on allocation one line may
// be prefetched; each hit doubles the fetch size, up to DEPTH, and grants that
// many new prefetches, limited by the free entries.
//
// All DEPTH tags are compared in parallel with a lookup. A lookup that the L2
// missed takes the hit (lk_take): a line already present is handed out at once
// on hit_data and its entry freed; a line still in flight is marked so that,
// when it arrives, it is passed on at once on late_* instead of being stored.
// Entries of a previous stream that are still in flight when the buffer is
// reallocated are marked stale and dropped when their data arrives.
//
// A candidate line that is already in the L2 or in another buffer is not
// fetched again: pf_skip steps the stream past it, using up one unit of the
// fetch budget as a prefetch would. The pool only skips strided candidates; an
// LDS buffer always fetches its lines, as it needs their pointers. chk_* is a
// second tag port used by the pool for this filter.
//
// Timing: lookup results, chk_hit and late_* are combinational; state changes
// at the clock edge. The prefetch request (pf_req_*) is held until pf_grant or
// pf_skip.
// Following the design: the two buffer types, the link-following of LDS buffers,
// incremental prefetching. This implementation's choices: handling of hits on
// in-flight lines, stale entries, and a null pointer as end of list.
module stream_buffer
  import pf_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  // allocation
  input  logic     alloc_valid,
  input  sb_mode_e alloc_mode,
  input  addr_t    alloc_pc,
  input  addr_t    alloc_miss_addr,   // byte address of the missing load
  input  laddr_t   alloc_next_laddr,  // SB_STRIDE: first line to prefetch
  input  stride_t  alloc_stride,      // SB_STRIDE: stride in lines
  input  doff_t    alloc_pdisp,       // SB_LDS: node displacement of the next pointer
  input  doff_t    alloc_cdisp,       // SB_LDS: node displacement read by the missing load
  output logic     active,
  output addr_t    pc,
  output sb_mode_e mode,
  // lookup
  input  laddr_t   lk_laddr,
  output logic     hit,
  output logic     hit_ready,
  output line_t    hit_data,
  input  logic     lk_take,
  // prefetch request
  output logic     pf_req_valid,
  output laddr_t   pf_req_laddr,
  output logic [$clog2(DEPTH > 1 ? DEPTH : 2)-1:0] pf_req_slot,
  input  logic     pf_grant,
  input  logic     pf_skip,           // line already held elsewhere: step past it
  // second tag port, to filter other buffers' candidates
  input  laddr_t   chk_laddr,
  output logic     chk_hit,
  // fill bus (every line returned from memory)
  input  logic     fill_valid,
  input  laddr_t   fill_laddr,
  input  line_t    fill_data,
  input  logic     fill_mine,         // this fill is this buffer's prefetch
  input  logic [$clog2(DEPTH > 1 ? DEPTH : 2)-1:0] fill_slot,
  output logic     late_valid,
  output laddr_t   late_laddr,
  output line_t    late_data
);
  localparam int unsigned SW = $clog2(DEPTH > 1 ? DEPTH : 2);
  localparam int unsigned FW = $clog2(DEPTH) + 2;

  typedef enum logic [1:0] {E_FREE, E_FLIGHT, E_READY} est_e;

  est_e    est   [DEPTH];
  logic    stale [DEPTH];
  logic    waitf [DEPTH];
  laddr_t  eaddr [DEPTH];
  line_t   edata [DEPTH];

  laddr_t  next_laddr;
  stride_t stride;
  doff_t   pdisp, cdisp;
  addr_t   link_addr;
  logic    need_link;
  logic    tgt_valid, tgt2_valid;
  laddr_t  tgt_laddr, tgt2_laddr;
  logic [FW-1:0] fsize, budget;

  // ---------------- lookup ----------------
  logic [SW-1:0] hslot;
  always_comb begin
    hit = 1'b0; hslot = '0;
    for (int i = 0; i < DEPTH; i++)
      if (active && est[i] != E_FREE && !stale[i] && !waitf[i] && eaddr[i] == lk_laddr && !hit) begin
        hit = 1'b1; hslot = SW'(i);
      end
  end
  assign hit_ready = hit && est[hslot] == E_READY;

  always_comb begin
    chk_hit = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (active && est[i] != E_FREE && !stale[i] && eaddr[i] == chk_laddr) chk_hit = 1'b1;
  end
  assign hit_data  = edata[hslot];

  // ---------------- prefetch request ----------------
  logic          have_free;
  logic [SW-1:0] fslot;
  always_comb begin
    have_free = 1'b0; fslot = '0;
    for (int i = 0; i < DEPTH; i++)
      if (est[i] == E_FREE && !have_free) begin
        have_free = 1'b1; fslot = SW'(i);
      end
  end
  assign pf_req_valid = active && budget != '0 && have_free &&
                        (mode == SB_STRIDE || tgt_valid);
  assign pf_req_laddr = (mode == SB_STRIDE) ? next_laddr : tgt_laddr;
  assign pf_req_slot  = fslot;

  // ---------------- fill ----------------
  assign late_valid = fill_valid && fill_mine && est[fill_slot] == E_FLIGHT &&
                      !stale[fill_slot] && waitf[fill_slot];
  assign late_laddr = fill_laddr;
  assign late_data  = fill_data;

  // LDS: the snooped line holds the wanted pointer
  logic  link_seen;
  addr_t ptr, new_link, new_use, alloc_link;
  assign link_seen = active && mode == SB_LDS && need_link && fill_valid &&
                     fill_laddr == line_of(link_addr);
  assign ptr       = word_at(fill_data, link_addr);
  assign new_link  = ptr + addr_t'(pdisp);
  assign new_use   = ptr + addr_t'(cdisp);
  assign alloc_link = alloc_miss_addr - addr_t'(alloc_cdisp) + addr_t'(alloc_pdisp);

  logic [FW-1:0] fs_dbl;
  assign fs_dbl = (2 * fsize > FW'(DEPTH)) ? FW'(DEPTH) : 2 * fsize;

  logic take, issue, adv;
  assign take  = lk_take && hit;
  assign issue = pf_req_valid && pf_grant && !pf_skip;     // takes an entry
  assign adv   = pf_req_valid && (pf_grant || pf_skip);    // consumes budget and address

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; pc <= '0; mode <= SB_STRIDE;
      next_laddr <= '0; stride <= '0; pdisp <= '0; cdisp <= '0; link_addr <= '0;
      need_link <= 1'b0; tgt_valid <= 1'b0; tgt2_valid <= 1'b0;
      tgt_laddr <= '0; tgt2_laddr <= '0; fsize <= '0; budget <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        est[i] <= E_FREE; stale[i] <= 1'b0; waitf[i] <= 1'b0;
        eaddr[i] <= '0; edata[i] <= '0;
      end
    end else begin
      // data returning for one of our entries
      if (fill_valid && fill_mine && est[fill_slot] == E_FLIGHT) begin
        if (stale[fill_slot] || waitf[fill_slot]) begin
          est[fill_slot]   <= E_FREE;
          stale[fill_slot] <= 1'b0;
          waitf[fill_slot] <= 1'b0;
        end else begin
          est[fill_slot]   <= E_READY;
          edata[fill_slot] <= fill_data;
        end
      end
      // a demand takes a line (hit on a present or an in-flight line)
      if (take) begin
        if (est[hslot] == E_READY) est[hslot] <= E_FREE;
        else                       waitf[hslot] <= 1'b1;
      end
      // prefetch issued
      if (issue) begin
        est[fslot]   <= E_FLIGHT;
        eaddr[fslot] <= pf_req_laddr;
        stale[fslot] <= 1'b0;
        waitf[fslot] <= 1'b0;
      end
      // throttle
      if (take) begin
        fsize  <= fs_dbl;
        budget <= fs_dbl - FW'(adv);
      end else if (adv) begin
        budget <= budget - 1'b1;
      end
      // address generation
      if (adv) begin
        if (mode == SB_STRIDE) next_laddr <= next_laddr + laddr_t'(stride);
        else begin
          tgt_valid  <= tgt2_valid;
          tgt_laddr  <= tgt2_laddr;
          tgt2_valid <= 1'b0;
        end
      end
      if (link_seen) begin
        if (ptr == '0) begin
          need_link <= 1'b0;
        end else begin
          link_addr  <= new_link;
          tgt_valid  <= 1'b1;
          tgt_laddr  <= line_of(new_use);
          tgt2_valid <= line_of(new_link) != line_of(new_use);
          tgt2_laddr <= line_of(new_link);
        end
      end
      // (re)allocation overrides the stream state
      if (alloc_valid) begin
        active     <= 1'b1;
        pc         <= alloc_pc;
        mode       <= alloc_mode;
        next_laddr <= alloc_next_laddr;
        stride     <= alloc_stride;
        pdisp      <= alloc_pdisp;
        cdisp      <= alloc_cdisp;
        link_addr  <= alloc_link;
        need_link  <= alloc_mode == SB_LDS;
        tgt_valid  <= alloc_mode == SB_LDS && line_of(alloc_link) != line_of(alloc_miss_addr);
        tgt_laddr  <= line_of(alloc_link);
        tgt2_valid <= 1'b0;
        fsize      <= FW'(1);
        budget     <= FW'(1);
        // present lines of the old stream are dropped; lines in flight are
        // dropped when they arrive, unless a demand is waiting for them
        for (int i = 0; i < DEPTH; i++) begin
          if (est[i] == E_READY) est[i] <= E_FREE;
          if (est[i] == E_FLIGHT && !waitf[i]) begin
            if (fill_valid && fill_mine && fill_slot == SW'(i)) est[i] <= E_FREE;
            else stale[i] <= 1'b1;
          end
        end
      end
    end
  end

  // A buffer is never allocated in the cycle a demand takes one of its lines.
  assert property (@(posedge clk) disable iff (!rst_n) !(alloc_valid && take));
endmodule
