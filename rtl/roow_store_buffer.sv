// roow_store_buffer: the dual-mode (in-order / out-of-order) store buffer.
//
// A circular buffer of N entries with a head and a tail pointer.  Committed
// stores enter at the tail and leave from the head, always in program order.
// Besides address, data and byte enables each entry keeps
//   mode      - copied from the region flag at commit (1 = DRF, 0 = SYNC)
//   issued    - the store has been initiated into the cache pipeline
//   performed - its cache write is done
//   fence     - a store-buffer fence sits just before this store
//
// Initiation (roow_issue_select): in order, one store per cycle.  A SYNC
// store that misses makes the cache pipeline squash the younger SYNC stores
// in flight; their issued bits are cleared here so that they are initiated
// again, in order, once the missing store has completed (sync_miss_pend is
// held until the cache reports that slot done).  DRF stores are never
// squashed and keep writing out of order under an outstanding miss.
//
// Retirement: the head leaves only once performed.  A performed SYNC head
// leaves at once.  A performed DRF head stays, so that it keeps forwarding
// to loads (the store buffer used as a cache), until its slot is needed: the
// buffer is full and a new store is waiting.  This design also drains a
// performed DRF head when a performed SYNC store is waiting behind it, so
// that completed SYNC stores leave the buffer as soon as order allows; the
// document asks SYNC stores to leave when they complete but retires strictly
// in order.  At most one store enters and one leaves per cycle; a store may
// enter a full buffer in the same cycle its performed head leaves.
//
// Loads search the buffer through roow_sb_forward (combinational, same
// cycle).  Completions from the pipeline (hit_*) and from the cache's MSHRs
// (fill_*) set the performed bit at the next clock edge.
//
// The reset is asynchronous and active low.  The assertions below use it as
// their disable condition, which lint tools report as a synchronous use of
// the reset; that use is intended.
module roow_store_buffer
  import roow_pkg::*;
#(
  parameter int unsigned N      = SB_ENTRIES,
  parameter int unsigned STAGES = CACHE_STAGES,
  parameter int unsigned AW     = WADDR_W,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned BW     = DW / 8,
  parameter int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned CNT_W  = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // stores from commit
  input  logic              st_valid,
  output logic              st_ready,
  input  logic [AW-1:0]     st_addr,
  input  logic [DW-1:0]     st_data,
  input  logic [BW-1:0]     st_be,
  input  mode_e             st_mode,
  input  logic              st_fence,
  // initiation into the cache pipeline
  output logic              iss_valid,
  output logic [IDX_W-1:0]  iss_idx,
  output mode_e             iss_mode,
  output logic [AW-1:0]     iss_addr,
  output logic [DW-1:0]     iss_data,
  output logic [BW-1:0]     iss_be,
  // results from the cache pipeline
  input  logic              hit_valid,
  input  logic [IDX_W-1:0]  hit_idx,
  input  logic              miss_valid,
  input  logic [IDX_W-1:0]  miss_idx,
  input  mode_e             miss_mode,
  input  logic [STAGES-1:0] squash_valid,
  input  logic [IDX_W-1:0]  squash_idx [STAGES],
  // miss completion from the cache (MSHR)
  input  logic              fill_valid,
  input  logic [IDX_W-1:0]  fill_idx,
  // load snoop
  input  logic              ld_valid,
  input  logic [AW-1:0]     ld_addr,
  input  logic [BW-1:0]     ld_be,
  output logic              ld_fwd_hit,
  output logic              ld_fwd_partial,
  output logic [DW-1:0]     ld_fwd_data,
  output logic [IDX_W-1:0]  ld_fwd_idx,
  // status
  output logic [CNT_W-1:0]  count,
  output logic              full,
  output logic              retire_valid,
  output logic [IDX_W-1:0]  retire_idx,
  output logic              retire_evict,   // a performed DRF head left to make room
  output logic              sync_miss_pend,
  output logic              stall_sync,
  output logic              stall_fence
);

  logic [N-1:0]     valid, issued, performed, mode, fence;
  logic [AW-1:0]    addr [N];
  logic [DW-1:0]    data [N];
  logic [BW-1:0]    be   [N];
  logic [IDX_W-1:0] head, tail;
  logic [IDX_W-1:0] sync_miss_idx;

  logic             push, pop, head_done, sync_done_waiting, sync_block;

  function automatic logic [IDX_W-1:0] next_slot(input logic [IDX_W-1:0] s);
    return (s == IDX_W'(N - 1)) ? '0 : s + 1'b1;
  endfunction

  assign full       = (count == CNT_W'(N));
  assign sync_block = sync_miss_pend || (miss_valid && (miss_mode == MODE_SYNC));

  // Retirement.
  always_comb begin
    sync_done_waiting = 1'b0;
    for (int i = 0; i < N; i++)
      if (valid[i] && performed[i] && (mode[i] == MODE_SYNC)) sync_done_waiting = 1'b1;
  end
  assign head_done    = valid[head] && performed[head];
  assign retire_evict = head_done && (mode[head] == MODE_DRF) && full && st_valid;
  assign pop          = head_done && ((mode[head] == MODE_SYNC) || retire_evict || sync_done_waiting);
  assign retire_valid = pop;
  assign retire_idx   = head;
  assign st_ready     = !full || pop;
  assign push         = st_valid && st_ready;

  roow_issue_select #(.N(N), .IDX_W(IDX_W)) u_issue (
    .head        (head),
    .valid       (valid),
    .issued      (issued),
    .performed   (performed),
    .mode        (mode),
    .fence       (fence),
    .sync_block  (sync_block),
    .issue_valid (iss_valid),
    .issue_idx   (iss_idx),
    .stall_sync  (stall_sync),
    .stall_fence (stall_fence)
  );

  assign iss_mode = mode_e'(mode[iss_idx]);
  assign iss_addr = addr[iss_idx];
  assign iss_data = data[iss_idx];
  assign iss_be   = be[iss_idx];

  roow_sb_forward #(.N(N), .AW(AW), .DW(DW), .BW(BW), .IDX_W(IDX_W)) u_fwd (
    .head        (head),
    .valid       (valid),
    .addr        (addr),
    .be          (be),
    .data        (data),
    .ld_valid    (ld_valid),
    .ld_addr     (ld_addr),
    .ld_be       (ld_be),
    .fwd_hit     (ld_fwd_hit),
    .fwd_partial (ld_fwd_partial),
    .fwd_idx     (ld_fwd_idx),
    .fwd_data    (ld_fwd_data)
  );

  // Payload: written only at insertion.
  always_ff @(posedge clk) begin
    if (push) begin
      addr[tail] <= st_addr;
      data[tail] <= st_data;
      be[tail]   <= st_be;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid          <= '0;
      issued         <= '0;
      performed      <= '0;
      mode           <= '0;
      fence          <= '0;
      head           <= '0;
      tail           <= '0;
      count          <= '0;
      sync_miss_pend <= 1'b0;
      sync_miss_idx  <= '0;
    end else begin
      if (iss_valid) issued[iss_idx] <= 1'b1;
      for (int s = 0; s < STAGES; s++)
        if (squash_valid[s]) issued[squash_idx[s]] <= 1'b0;
      if (hit_valid)  performed[hit_idx]  <= 1'b1;
      if (fill_valid) performed[fill_idx] <= 1'b1;

      if (miss_valid && (miss_mode == MODE_SYNC)) begin
        sync_miss_pend <= 1'b1;
        sync_miss_idx  <= miss_idx;
      end else if (fill_valid && sync_miss_pend && (fill_idx == sync_miss_idx)) begin
        sync_miss_pend <= 1'b0;
      end

      if (pop) begin
        valid[head] <= 1'b0;
        head        <= next_slot(head);
      end
      if (push) begin
        valid[tail]     <= 1'b1;
        issued[tail]    <= 1'b0;
        performed[tail] <= 1'b0;
        mode[tail]      <= st_mode;
        fence[tail]     <= st_fence;
        tail            <= next_slot(tail);
      end
      count <= count + CNT_W'(push) - CNT_W'(pop);
    end
  end

  // A slot is only ever initiated or completed while it holds a store.
  assert property (@(posedge clk) disable iff (!rst_n) iss_valid |-> valid[iss_idx]);
  assert property (@(posedge clk) disable iff (!rst_n) hit_valid |-> valid[hit_idx]);
  assert property (@(posedge clk) disable iff (!rst_n) fill_valid |-> valid[fill_idx]);
  // Stores leave the buffer only after their write has performed.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> performed[head]);

endmodule
