// roow_issue_select: picks the store that the store buffer initiates next.
//
// Stores are initiated in program order, one per cycle (one cache port for
// stores).  The candidate is the oldest valid entry, counting from the head,
// that is neither issued nor performed.  It is held back when
//   * it is a SYNC store and a SYNC store miss is outstanding (sync_block):
//     the sync stores behind a miss are re-initiated only after the missing
//     store completes, which keeps sync writes in order; or
//   * it carries a fence bit and some older store has not yet performed: a
//     fence lets no store of the next region start before all stores of the
//     previous regions are done.
// Because initiation is in order, everything younger than a held store waits
// too, so DRF stores run ahead only until the first blocked store.  A DRF
// candidate is never held for an outstanding miss.  The rules follow the
// document; the age scan is this design's own.
//
// Purely combinational.  Interface: per-entry bit vectors indexed by buffer
// slot, plus the head slot; outputs the chosen slot and the reason for a
// stall.
module roow_issue_select
  import roow_pkg::*;
#(
  parameter int unsigned N     = SB_ENTRIES,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [IDX_W-1:0] head,
  input  logic [N-1:0]     valid,
  input  logic [N-1:0]     issued,
  input  logic [N-1:0]     performed,
  input  logic [N-1:0]     mode,        // 1 = DRF, 0 = SYNC
  input  logic [N-1:0]     fence,
  input  logic             sync_block,  // a SYNC store miss is outstanding
  output logic             issue_valid,
  output logic [IDX_W-1:0] issue_idx,
  output logic             stall_sync,  // candidate held by a sync miss
  output logic             stall_fence  // candidate held by a fence
);

  logic             found;
  logic             older_unperf;
  logic             cand_older_unperf;
  logic [IDX_W-1:0] cand;
  int unsigned      slot;

  always_comb begin
    found             = 1'b0;
    older_unperf      = 1'b0;
    cand_older_unperf = 1'b0;
    cand              = '0;
    slot              = 0;
    for (int unsigned k = 0; k < N; k++) begin
      slot = int'(head) + k;
      if (slot >= N) slot = slot - N;
      if (!found && valid[slot] && !issued[slot] && !performed[slot]) begin
        found             = 1'b1;
        cand              = IDX_W'(slot);
        cand_older_unperf = older_unperf;
      end
      if (valid[slot] && !performed[slot]) older_unperf = 1'b1;
    end
    stall_sync  = found && (mode[cand] == MODE_SYNC) && sync_block;
    stall_fence = found && fence[cand] && cand_older_unperf;
    issue_valid = found && !stall_sync && !stall_fence;
    issue_idx   = cand;
  end

endmodule
