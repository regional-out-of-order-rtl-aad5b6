// roow_store_unit: regional out-of-order writes (ROOW) store path of one
// core, from commit to the L1 data cache.
//
// Under TSO a store buffer normally writes stores to the cache strictly in
// order, so one store that misses holds up every store behind it.  ROOW lets
// the compiler mark data-race-free (DRF) regions, where no other thread can
// observe the order of this thread's stores, with a setDRF instruction.  This
// unit holds:
//   roow_region_flag   - the region flag set by committing setDRF, and the
//                        store-buffer fence raised at each region boundary;
//   roow_store_buffer  - the dual-mode store buffer: SYNC stores write in
//                        order as in TSO, DRF stores write out of order,
//                        performed DRF stores stay and forward to loads until
//                        their slot is needed;
//   roow_cache_pipe    - the four-stage, one-store-per-cycle cache store
//                        pipeline that squashes younger SYNC stores behind a
//                        SYNC miss.
// The L1 cache with its MSHRs and the core are outside: the commit port, the
// load snoop port and the L1 lookup/completion ports are this unit's ports.
//
// Interface and timing:
//   commit: st_valid/st_ready handshake, one store per cycle; setdrf_commit
//           and fence_commit are single-cycle pulses at commit (a store in
//           the same cycle counts as younger).
//   L1:     lk_valid with slot/address/data/byte enables in the last pipeline
//           stage; the cache answers lk_hit in the same cycle and, for a miss,
//           later pulses fill_valid with the slot once the write is done.
//           A store initiated in cycle t that hits is performed in t+4.
//   load:   ld_valid/ld_addr/ld_be search, answered in the same cycle.
//   ev_*:   single-cycle event pulses for performance counting.
module roow_store_unit
  import roow_pkg::*;
#(
  parameter int unsigned N               = SB_ENTRIES,
  parameter int unsigned STAGES          = CACHE_STAGES,
  parameter int unsigned AW              = WADDR_W,
  parameter int unsigned DW              = DATA_W,
  parameter bit          FENCE_ON_SETDRF = 1'b1,
  parameter int unsigned BW              = DW / 8,
  parameter int unsigned IDX_W           = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned CNT_W           = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // commit
  input  logic             st_valid,
  output logic             st_ready,
  input  logic [AW-1:0]    st_addr,
  input  logic [DW-1:0]    st_data,
  input  logic [BW-1:0]    st_be,
  input  logic             setdrf_commit,
  input  logic             setdrf_val,
  input  logic             fence_commit,
  // load snoop
  input  logic             ld_valid,
  input  logic [AW-1:0]    ld_addr,
  input  logic [BW-1:0]    ld_be,
  output logic             ld_fwd_hit,
  output logic             ld_fwd_partial,
  output logic [DW-1:0]    ld_fwd_data,
  output logic [IDX_W-1:0] ld_fwd_idx,
  // L1 data cache
  output logic             lk_valid,
  output logic [IDX_W-1:0] lk_idx,
  output mode_e            lk_mode,
  output logic [AW-1:0]    lk_addr,
  output logic [DW-1:0]    lk_data,
  output logic [BW-1:0]    lk_be,
  input  logic             lk_hit,
  input  logic             fill_valid,
  input  logic [IDX_W-1:0] fill_idx,
  // status and events
  output logic             region_flag,
  output logic [CNT_W-1:0] sb_count,
  output logic             sb_full,
  output logic             sync_miss_pend,  // a SYNC store miss is outstanding
  output logic             fence_pending,   // a fence waits for the next store
  output logic             retire_valid,
  output logic [IDX_W-1:0] retire_idx,
  output logic             ev_full_stall,   // a store waits at commit: buffer full
  output logic             ev_sync_squash,  // SYNC miss squashed younger SYNC stores
  output logic             ev_sync_stall,   // initiation held by a SYNC miss
  output logic             ev_fence_stall,  // initiation held by a fence
  output logic             ev_drf_evict     // performed DRF store left to make room
);

  mode_e            st_mode;
  logic             st_fence;

  logic             iss_valid;
  logic [IDX_W-1:0] iss_idx;
  mode_e            iss_mode;
  logic [AW-1:0]    iss_addr;
  logic [DW-1:0]    iss_data;
  logic [BW-1:0]    iss_be;

  logic              hit_valid, miss_valid;
  logic [IDX_W-1:0]  hit_idx, miss_idx;
  mode_e             miss_mode;
  logic [STAGES-1:0] squash_valid;
  logic [IDX_W-1:0]  squash_idx [STAGES];

  roow_region_flag #(.FENCE_ON_SETDRF(FENCE_ON_SETDRF)) u_flag (
    .clk           (clk),
    .rst_n         (rst_n),
    .setdrf_commit (setdrf_commit),
    .setdrf_val    (setdrf_val),
    .fence_commit  (fence_commit),
    .store_accept  (st_valid && st_ready),
    .region_flag   (region_flag),
    .store_mode    (st_mode),
    .store_fence   (st_fence),
    .fence_pending (fence_pending)
  );

  roow_store_buffer #(.N(N), .STAGES(STAGES), .AW(AW), .DW(DW), .BW(BW),
                      .IDX_W(IDX_W), .CNT_W(CNT_W)) u_sb (
    .clk            (clk),
    .rst_n          (rst_n),
    .st_valid       (st_valid),
    .st_ready       (st_ready),
    .st_addr        (st_addr),
    .st_data        (st_data),
    .st_be          (st_be),
    .st_mode        (st_mode),
    .st_fence       (st_fence),
    .iss_valid      (iss_valid),
    .iss_idx        (iss_idx),
    .iss_mode       (iss_mode),
    .iss_addr       (iss_addr),
    .iss_data       (iss_data),
    .iss_be         (iss_be),
    .hit_valid      (hit_valid),
    .hit_idx        (hit_idx),
    .miss_valid     (miss_valid),
    .miss_idx       (miss_idx),
    .miss_mode      (miss_mode),
    .squash_valid   (squash_valid),
    .squash_idx     (squash_idx),
    .fill_valid     (fill_valid),
    .fill_idx       (fill_idx),
    .ld_valid       (ld_valid),
    .ld_addr        (ld_addr),
    .ld_be          (ld_be),
    .ld_fwd_hit     (ld_fwd_hit),
    .ld_fwd_partial (ld_fwd_partial),
    .ld_fwd_data    (ld_fwd_data),
    .ld_fwd_idx     (ld_fwd_idx),
    .count          (sb_count),
    .full           (sb_full),
    .retire_valid   (retire_valid),
    .retire_idx     (retire_idx),
    .retire_evict   (ev_drf_evict),
    .sync_miss_pend (sync_miss_pend),
    .stall_sync     (ev_sync_stall),
    .stall_fence    (ev_fence_stall)
  );

  roow_cache_pipe #(.STAGES(STAGES), .N(N), .AW(AW), .DW(DW), .BW(BW),
                    .IDX_W(IDX_W)) u_pipe (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (iss_valid),
    .in_idx       (iss_idx),
    .in_mode      (iss_mode),
    .in_addr      (iss_addr),
    .in_data      (iss_data),
    .in_be        (iss_be),
    .lk_valid     (lk_valid),
    .lk_idx       (lk_idx),
    .lk_mode      (lk_mode),
    .lk_addr      (lk_addr),
    .lk_data      (lk_data),
    .lk_be        (lk_be),
    .lk_hit       (lk_hit),
    .hit_valid    (hit_valid),
    .hit_idx      (hit_idx),
    .miss_valid   (miss_valid),
    .miss_idx     (miss_idx),
    .miss_mode    (miss_mode),
    .squash_valid (squash_valid),
    .squash_idx   (squash_idx)
  );

  assign ev_full_stall  = st_valid && !st_ready;
  assign ev_sync_squash = |squash_valid;

endmodule
