// hybrid_prefetcher: hybrid strided/LDS stream-buffer prefetcher between L2 and main memory.
//
// The prefetcher sits behind the L2 and fetches lines from main memory into
// NUM_SB stream buffers ahead of the demand stream, so that misses that would
// cost ~115 cycles are served at L2-hit latency instead. It is trained on two
// streams:
//   * the L2 miss stream (PC and address of every load that missed in L1 and
//     in L2): a 32-entry PC-indexed stride_table classifies the PC as strided;
//   * committed loads (PC, base address, effective address, loaded value): the
//     ppw (potential producer window) and corr_table recognise loads that
//     dereference pointers loaded by earlier loads, and record for their PC
//     where in a node the next pointer sits and where the load itself reads.
// On an L2 miss that also misses the stream buffers, a buffer is allocated with
// preference for the strided type: strided if the stride table has confirmed a
// stride for the PC, otherwise LDS if the PC hits in the correlation table,
// otherwise none. Demand misses and prefetches share the 16-entry mreq_buffer,
// whose return data bus serves demands first.
//
// Request interface (req_*): one L1 miss per cycle, with the L2's hit/miss
// verdict for the same line (the L2 and the buffers are searched together).
//   L2 hit                 nothing happens here.
//   buffer hit, line there the line is returned on pb_* HIT_LAT (10) cycles
//                          later, the L2-hit latency, for the L1 and the L2.
//   buffer hit, in flight  the line is returned on l2_fill_* when it arrives
//                          (l2_fill_late = 1).
//   miss                   demand request to memory; line on l2_fill_* when it
//                          has crossed the data bus; training and allocation.
// req_ready is low only when a demand miss finds the mreq buffer full; then the
// request has no effect and must be held. Committed loads (ld_*) are accepted
// every cycle. Memory devices are reached through mem_req_* / mem_resp_*
// (see mreq_buffer), and the bus beats are visible on beat_*.
// ev_* are one-cycle event pulses for performance counting.
// EN_STRIDE / EN_LDS (both 1 by default) turn the design into the pure
// strided or pure LDS stream-buffer prefetcher it is compared against; the
// detectors keep training either way.
//
// Following the design: the hybrid allocation policy, the table and buffer
// sizes, the buffers searched with the L2, the 10-cycle buffer hit latency and
// the memory/bus model, and no prefetch of a line the L2 (asked through
// l2_probe_*) or a buffer already holds. This implementation's choices:
// training the detectors only on misses that also miss the buffers, applying
// that filter to strided candidates only (an LDS buffer needs the data of its
// lines to follow the links), and keeping the consumer's own displacement in
// the CT next to the pointer's, so that loads reading a node at a non-zero
// displacement are followed correctly.
module hybrid_prefetcher
  import pf_pkg::*;
#(
  parameter int unsigned NUM_SB     = 16,
  parameter int unsigned SB_DEPTH   = 2,
  parameter int unsigned STRIDE_ENT = 32,
  parameter int unsigned PPW_ENT    = 128,
  parameter int unsigned CT_ENT     = 256,
  parameter int unsigned MREQ_ENT   = 16,
  parameter int unsigned HIT_LAT    = 10,
  parameter bit          EN_STRIDE  = 1'b1,  // strided buffers may be allocated
  parameter bit          EN_LDS     = 1'b1   // LDS buffers may be allocated
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // L1 miss requests with the L2 verdict
  input  logic                        req_valid,
  input  addr_t                       req_pc,
  input  addr_t                       req_addr,
  input  logic                        req_l2_hit,
  output logic                        req_ready,
  // L2 tag probe for prefetch candidates (answered in the same cycle)
  output laddr_t                      l2_probe_laddr,
  input  logic                        l2_probe_hit,
  // committed loads
  input  logic                        ld_valid,
  input  addr_t                       ld_pc,
  input  addr_t                       ld_base,
  input  addr_t                       ld_ea,
  input  addr_t                       ld_value,
  // lines from the stream buffers (to L1 and L2)
  output logic                        pb_valid,
  output laddr_t                      pb_laddr,
  output line_t                       pb_data,
  // lines from memory for demands (to L1 and L2)
  output logic                        l2_fill_valid,
  output laddr_t                      l2_fill_laddr,
  output line_t                       l2_fill_data,
  output logic                        l2_fill_late,
  // memory devices
  output logic                        mem_req_valid,
  output logic [$clog2(MREQ_ENT)-1:0] mem_req_idx,
  output laddr_t                      mem_req_laddr,
  input  logic                        mem_resp_valid,
  input  logic [$clog2(MREQ_ENT)-1:0] mem_resp_idx,
  input  line_t                       mem_resp_data,
  // return data bus
  output logic                        beat_valid,
  output beat_t                       beat_data,
  output logic                        bus_busy,
  // stream buffer state: allocated, and of the LDS type
  output logic [NUM_SB-1:0]           sb_active,
  output logic [NUM_SB-1:0]           sb_lds,
  // events
  output logic                        ev_demand_miss,
  output logic                        ev_alloc_stride,
  output logic                        ev_alloc_lds,
  output logic                        ev_pb_hit,
  output logic                        ev_late_hit,
  output logic                        ev_prefetch,
  output logic                        ev_ct_write,
  output logic                        ev_stall,
  output logic                        ev_pf_skip
);
  localparam int unsigned SW    = $clog2(SB_DEPTH > 1 ? SB_DEPTH : 2);
  localparam int unsigned TAG_W = $clog2(NUM_SB) + SW;

  laddr_t req_laddr;
  assign req_laddr = line_of(req_addr);

  // ---------------- stream buffers ----------------
  logic             sb_hit, sb_hit_ready, sb_alloc, sb_take;
  line_t            sb_hit_data;
  logic             sb_pf_valid, sb_pf_grant;
  laddr_t           sb_pf_laddr;
  logic [TAG_W-1:0] sb_pf_tag;
  logic             late_valid;
  laddr_t           late_laddr;
  line_t            late_data;
  sb_mode_e         alloc_mode;

  // ---------------- detectors ----------------
  logic    str_hit, ct_hit, ppw_hit, use_str, use_lds;
  stride_t str_stride;
  laddr_t  str_next;
  doff_t   ct_pdisp, ct_cdisp, ppw_off, ld_disp;

  // ---------------- memory request buffer ----------------
  logic             mq_valid, mq_demand, mq_ready;
  laddr_t           mq_laddr;
  logic [TAG_W-1:0] mq_tag;
  logic             f_valid, f_demand;
  laddr_t           f_laddr;
  line_t            f_data;
  logic [TAG_W-1:0] f_tag;

  logic demand_req, req_fire, real_miss;
  assign demand_req = req_valid && !req_l2_hit && !sb_hit;
  assign req_ready  = !demand_req || mq_ready;
  assign req_fire   = req_valid && req_ready;
  assign real_miss  = req_fire && demand_req;
  assign sb_take    = req_fire && !req_l2_hit;

  assign mq_valid    = demand_req || sb_pf_valid;
  assign mq_demand   = demand_req;
  assign mq_laddr    = demand_req ? req_laddr : sb_pf_laddr;
  assign mq_tag      = demand_req ? '0 : sb_pf_tag;
  assign sb_pf_grant = !demand_req && mq_ready;

  // hybrid allocation policy: strided first, LDS if the CT knows the PC
  assign use_str    = EN_STRIDE && str_hit;
  assign use_lds    = EN_LDS && ct_hit;
  assign sb_alloc   = real_miss && (use_str || use_lds);
  assign alloc_mode = use_str ? SB_STRIDE : SB_LDS;

  stride_table #(.ENTRIES(STRIDE_ENT)) u_stride (
    .clk, .rst_n,
    .miss_valid (real_miss),
    .miss_pc    (req_pc),
    .miss_laddr (req_laddr),
    .strided    (str_hit),
    .stride     (str_stride),
    .next_laddr (str_next)
  );

  assign ld_disp = doff_t'(ld_ea - ld_base);

  ppw #(.ENTRIES(PPW_ENT)) u_ppw (
    .clk, .rst_n,
    .ld_valid, .ld_base,
    .ld_disp  (ld_disp),
    .ld_value,
    .hit      (ppw_hit),
    .hit_off  (ppw_off)
  );

  corr_table #(.ENTRIES(CT_ENT)) u_ct (
    .clk, .rst_n,
    .wr_valid (ld_valid && ppw_hit),
    .wr_pc    (ld_pc),
    .wr_pdisp (ppw_off),
    .wr_cdisp (ld_disp),
    .rd_valid (real_miss),
    .rd_pc    (req_pc),
    .rd_hit   (ct_hit),
    .rd_pdisp (ct_pdisp),
    .rd_cdisp (ct_cdisp)
  );

  stream_buffer_pool #(.NUM(NUM_SB), .DEPTH(SB_DEPTH), .TAG_W(TAG_W)) u_pool (
    .clk, .rst_n,
    .alloc_valid      (sb_alloc),
    .alloc_mode       (alloc_mode),
    .alloc_pc         (req_pc),
    .alloc_miss_addr  (req_addr),
    .alloc_next_laddr (str_next),
    .alloc_stride     (str_stride),
    .alloc_pdisp      (ct_pdisp),
    .alloc_cdisp      (ct_cdisp),
    .lk_valid         (req_valid),
    .lk_laddr         (req_laddr),
    .lk_take          (sb_take),
    .hit              (sb_hit),
    .hit_ready        (sb_hit_ready),
    .hit_data         (sb_hit_data),
    .pf_req_valid     (sb_pf_valid),
    .pf_req_laddr     (sb_pf_laddr),
    .pf_req_tag       (sb_pf_tag),
    .pf_grant         (sb_pf_grant),
    .l2_probe_laddr   (l2_probe_laddr),
    .l2_probe_hit     (l2_probe_hit),
    .pf_skipped       (ev_pf_skip),
    .fill_valid       (f_valid),
    .fill_laddr       (f_laddr),
    .fill_data        (f_data),
    .fill_demand      (f_demand),
    .fill_tag         (f_tag),
    .late_valid       (late_valid),
    .late_laddr       (late_laddr),
    .late_data        (late_data),
    .active           (sb_active),
    .lds              (sb_lds)
  );

  mreq_buffer #(.ENTRIES(MREQ_ENT), .TAG_W(TAG_W)) u_mreq (
    .clk, .rst_n,
    .req_valid      (mq_valid),
    .req_laddr      (mq_laddr),
    .req_demand     (mq_demand),
    .req_tag        (mq_tag),
    .req_ready      (mq_ready),
    .mem_req_valid, .mem_req_idx, .mem_req_laddr,
    .mem_resp_valid, .mem_resp_idx, .mem_resp_data,
    .beat_valid, .beat_data,
    .fill_valid     (f_valid),
    .fill_laddr     (f_laddr),
    .fill_data      (f_data),
    .fill_demand    (f_demand),
    .fill_tag       (f_tag),
    .busy           (bus_busy)
  );

  // ---------------- outputs ----------------
  // buffer hits return after the L2 hit latency
  logic   hp_v [HIT_LAT];
  laddr_t hp_a [HIT_LAT];
  line_t  hp_d [HIT_LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIT_LAT; i++) begin
        hp_v[i] <= 1'b0; hp_a[i] <= '0; hp_d[i] <= '0;
      end
    end else begin
      hp_v[0] <= sb_take && sb_hit_ready;
      hp_a[0] <= req_laddr;
      hp_d[0] <= sb_hit_data;
      for (int i = 1; i < HIT_LAT; i++) begin
        hp_v[i] <= hp_v[i-1]; hp_a[i] <= hp_a[i-1]; hp_d[i] <= hp_d[i-1];
      end
    end
  end
  assign pb_valid = hp_v[HIT_LAT-1];
  assign pb_laddr = hp_a[HIT_LAT-1];
  assign pb_data  = hp_d[HIT_LAT-1];

  assign l2_fill_valid = (f_valid && f_demand) || late_valid;
  assign l2_fill_late  = late_valid;
  assign l2_fill_laddr = late_valid ? late_laddr : f_laddr;
  assign l2_fill_data  = late_valid ? late_data  : f_data;

  assign ev_demand_miss  = real_miss;
  assign ev_alloc_stride = sb_alloc && alloc_mode == SB_STRIDE;
  assign ev_alloc_lds    = sb_alloc && alloc_mode == SB_LDS;
  assign ev_pb_hit       = sb_take && sb_hit;
  assign ev_late_hit     = late_valid;
  assign ev_prefetch     = sb_pf_valid && sb_pf_grant;
  assign ev_ct_write     = ld_valid && ppw_hit;
  assign ev_stall        = req_valid && !req_ready;

  // a demand fill and a late prefetch hit never meet on the fill port
  assert property (@(posedge clk) disable iff (!rst_n) !(f_valid && f_demand && late_valid));
endmodule
