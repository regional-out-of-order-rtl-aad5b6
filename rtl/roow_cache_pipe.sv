// roow_cache_pipe: the cache store pipeline between the store buffer and the
// L1 data cache, with ROOW's squash rule for sync misses.
//
// The store buffer initiates at most one store per cycle (a single cache port
// for stores).  A store walks through STAGES pipeline registers; in the last
// stage it performs its tag lookup in the L1 (lk_* outputs, lk_hit input
// from the cache in the same cycle).  On a hit the write is done and
// hit_valid reports the store-buffer slot as performed.  On a miss the cache
// takes the store into its MSHRs and later reports completion directly to the
// store buffer; the pipeline reports miss_valid.
//
// When a SYNC store misses, the younger SYNC stores still in the pipeline
// (and one entering it this cycle) are squashed so that none of them can
// write before the missing store; their slots are listed on
// squash_valid/squash_idx (slot i < STAGES-1 is pipeline stage i, slot
// STAGES-1 the entering store) so the store buffer can mark them for
// re-initiation.  DRF stores are never squashed, and a DRF miss squashes
// nothing.  This follows the document; it assumes a four-stage pipeline,
// which with the lookup in the last stage gives the 4-cycle L1 hit latency
// of the evaluated system: a store initiated in cycle t is reported
// performed (hit_valid) in cycle t+STAGES.
//
// The cache is assumed always to accept a lookup (no back-pressure), which
// the document does not discuss.
module roow_cache_pipe
  import roow_pkg::*;
#(
  parameter int unsigned STAGES = CACHE_STAGES,
  parameter int unsigned N      = SB_ENTRIES,
  parameter int unsigned AW     = WADDR_W,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned BW     = DW / 8,
  parameter int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // store initiated by the store buffer
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  mode_e            in_mode,
  input  logic [AW-1:0]    in_addr,
  input  logic [DW-1:0]    in_data,
  input  logic [BW-1:0]    in_be,
  // lookup/write at the L1 (last stage)
  output logic             lk_valid,
  output logic [IDX_W-1:0] lk_idx,
  output mode_e            lk_mode,
  output logic [AW-1:0]    lk_addr,
  output logic [DW-1:0]    lk_data,
  output logic [BW-1:0]    lk_be,
  input  logic             lk_hit,
  // results to the store buffer
  output logic             hit_valid,
  output logic [IDX_W-1:0] hit_idx,
  output logic             miss_valid,
  output logic [IDX_W-1:0] miss_idx,
  output mode_e            miss_mode,
  output logic [STAGES-1:0] squash_valid,
  output logic [IDX_W-1:0] squash_idx [STAGES]
);

  typedef struct packed {
    logic             valid;
    logic [IDX_W-1:0] idx;
    mode_e            mode;
    logic [AW-1:0]    addr;
    logic [DW-1:0]    data;
    logic [BW-1:0]    be;
  } pipe_t;

  pipe_t stage [STAGES];
  pipe_t entering;
  pipe_t last;
  logic  sync_miss;

  assign entering = '{valid: in_valid, idx: in_idx, mode: in_mode,
                      addr: in_addr, data: in_data, be: in_be};
  assign last     = stage[STAGES-1];

  assign lk_valid   = last.valid;
  assign lk_idx     = last.idx;
  assign lk_mode    = last.mode;
  assign lk_addr    = last.addr;
  assign lk_data    = last.data;
  assign lk_be      = last.be;

  assign hit_valid  = last.valid &&  lk_hit;
  assign hit_idx    = last.idx;
  assign miss_valid = last.valid && !lk_hit;
  assign miss_idx   = last.idx;
  assign miss_mode  = last.mode;
  assign sync_miss  = miss_valid && (last.mode == MODE_SYNC);

  // Younger SYNC stores to drop on a SYNC miss.
  always_comb begin
    for (int i = 0; i < STAGES - 1; i++) begin
      squash_valid[i] = sync_miss && stage[i].valid && (stage[i].mode == MODE_SYNC);
      squash_idx[i]   = stage[i].idx;
    end
    squash_valid[STAGES-1] = sync_miss && in_valid && (in_mode == MODE_SYNC);
    squash_idx[STAGES-1]   = in_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= '0;
    end else begin
      stage[0]       <= entering;
      stage[0].valid <= in_valid && !squash_valid[STAGES-1];
      for (int i = 1; i < STAGES; i++) begin
        stage[i]       <= stage[i-1];
        stage[i].valid <= stage[i-1].valid && !squash_valid[i-1];
      end
    end
  end

endmodule
