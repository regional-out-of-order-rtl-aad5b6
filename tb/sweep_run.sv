// sweep_run: testbench harness that streams one fixed synthetic store
// sequence through a roow_store_unit of N entries and reports the cycles it
// took.  The sequence is a function of the store number only (a multiplicative
// hash), so every instance sees the same stores.  Stores scatter over
// LINES_USED cache lines, so that first touches miss.
//   REGIONS = 0: no setDRF at all - every store is SYNC (TSO behaviour).
//   REGIONS = 1: the stream runs in DRF regions of REGION_LEN stores,
//                separated by short sync regions of 3 stores.
// FENCE_ON_SETDRF is passed to the unit; with 0 no fence is issued at all
// (the stream's regions do not alias).  The L1 model has a fixed miss
// latency and no random evictions, so runs are repeatable.  At the end the
// memory is compared with program-order execution; mismatches are counted
// in errors.
module sweep_run #(
  parameter int unsigned N               = 56,
  parameter bit          REGIONS         = 1'b1,
  parameter bit          FENCE_ON_SETDRF = 1'b1,
  parameter int unsigned NSTORES         = 3000,
  parameter int unsigned REGION_LEN      = 200,
  parameter int unsigned LINES_USED      = 256
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    done,
  output longint  cycles,
  output int      errors,
  output int      full_stalls
);
  import roow_pkg::*;

  localparam int unsigned IDX_W = $clog2(N);
  localparam int unsigned CNT_W = $clog2(N + 1);
  localparam int unsigned AW = WADDR_W, DW = DATA_W, BW = BE_W;
  localparam int unsigned MEMW = LINES_USED * 8;

  logic             st_valid, st_ready, setdrf_commit, setdrf_val;
  logic [AW-1:0]    st_addr;
  logic [DW-1:0]    st_data;
  logic             ld_fwd_hit, ld_fwd_partial;
  logic [DW-1:0]    ld_fwd_data;
  logic [IDX_W-1:0] ld_fwd_idx, lk_idx, fill_idx, retire_idx;
  logic             lk_valid, lk_hit, fill_valid;
  mode_e            lk_mode;
  logic [AW-1:0]    lk_addr;
  logic [DW-1:0]    lk_data;
  logic [BW-1:0]    lk_be;
  logic             region_flag, sb_full, sync_miss_pend, fence_pending, retire_valid;
  logic [CNT_W-1:0] sb_count;
  logic             ev_full_stall, ev_sync_squash, ev_sync_stall, ev_fence_stall, ev_drf_evict;

  roow_store_unit #(.N(N), .FENCE_ON_SETDRF(FENCE_ON_SETDRF)) u_unit (
    .clk, .rst_n, .st_valid, .st_ready, .st_addr, .st_data, .st_be(8'hFF),
    .setdrf_commit, .setdrf_val, .fence_commit(1'b0),
    .ld_valid(1'b0), .ld_addr('0), .ld_be('0), .ld_fwd_hit, .ld_fwd_partial, .ld_fwd_data, .ld_fwd_idx,
    .lk_valid, .lk_idx, .lk_mode, .lk_addr, .lk_data, .lk_be, .lk_hit, .fill_valid, .fill_idx,
    .region_flag, .sb_count, .sb_full, .sync_miss_pend, .fence_pending, .retire_valid, .retire_idx,
    .ev_full_stall, .ev_sync_squash, .ev_sync_stall, .ev_fence_stall, .ev_drf_evict
  );

  l1_model #(.IDX_W(IDX_W), .AW(AW), .DW(DW), .MEM_WORDS(MEMW), .MISS_MIN(30), .MISS_MAX(30)) u_l1 (
    .clk, .rst_n, .evict_en(1'b0), .lk_valid, .lk_idx, .lk_addr, .lk_data, .lk_be, .lk_hit,
    .fill_valid, .fill_idx
  );

  function automatic logic [AW-1:0] addr_of(input int unsigned i);
    int unsigned h;
    h = i * 32'h9E3779B1;
    return AW'((h >> 8) % MEMW);
  endfunction
  function automatic logic [DW-1:0] data_of(input int unsigned i);
    return {32'(i), 32'(i * 32'h85EBCA6B)};
  endfunction

  // Position in the stream: before store i, a sync region of 3 stores
  // starts when i % REGION_LEN == 0 (setDRF 0) and a DRF region resumes at
  // i % REGION_LEN == 3 (setDRF 1).
  int unsigned i;
  logic        pending_set;
  logic        pending_set_now;
  logic        set_done;   // the setDRF before store i has been issued
  int          writes;

  always_comb begin
    pending_set   = REGIONS && (i < NSTORES) && ((i % REGION_LEN == 0) || (i % REGION_LEN == 3));
    setdrf_commit = 1'b0;
    setdrf_val    = 1'b0;
    st_valid      = 1'b0;
    st_addr       = addr_of(i);
    st_data       = data_of(i);
    if (pending_set_now) begin
      setdrf_commit = 1'b1;
      setdrf_val    = (i % REGION_LEN == 3);
    end else if (i < NSTORES) begin
      st_valid = 1'b1;
    end
  end

  assign pending_set_now = pending_set && !set_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i           <= 0;
      set_done    <= 1'b0;
      cycles      <= 0;
      writes      <= 0;
      full_stalls <= 0;
    end else begin
      if (pending_set_now) set_done <= 1'b1;
      else if (st_valid && st_ready) begin
        i        <= i + 1;
        set_done <= 1'b0;
      end
      writes <= writes + int'(lk_valid && lk_hit) + int'(fill_valid);
      if (ev_full_stall) full_stalls <= full_stalls + 1;
      if (!done) cycles <= cycles + 1;
    end
  end

  assign done = (writes == int'(NSTORES));

  // Final memory against program order.
  always @(posedge done) begin
    logic [DW-1:0] ref_mem [MEMW];
    errors = 0;
    for (int w = 0; w < int'(MEMW); w++) ref_mem[w] = '0;
    for (int unsigned k = 0; k < NSTORES; k++) ref_mem[int'(addr_of(k))] = data_of(k);
    for (int w = 0; w < int'(MEMW); w++) if (u_l1.mem[w] != ref_mem[w]) errors++;
  end
endmodule
