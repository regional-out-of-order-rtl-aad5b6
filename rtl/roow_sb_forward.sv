// roow_sb_forward: associative store-to-load forwarding search of the store
// buffer.
//
// A load must read the value of the latest older store to the same location.
// Because the buffer inserts and retires stores in program order, the entry
// nearest the tail that overlaps the load is that store, even when DRF
// stores wrote the cache out of order.  Performed DRF stores stay in the
// buffer until their slot is needed, so they forward as well; this is what
// lets the store buffer act as a small cache.
//
// Granularity (this design's choice): entries hold a word address and byte
// enables.  If the youngest overlapping store supplies every byte the load
// asks for, fwd_hit is raised with its data; if it covers only part of them,
// fwd_partial tells the load to wait (no merging across several stores).
//
// Purely combinational: one load search per cycle.
module roow_sb_forward
  import roow_pkg::*;
#(
  parameter int unsigned N     = SB_ENTRIES,
  parameter int unsigned AW    = WADDR_W,
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned BW    = DW / 8,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [IDX_W-1:0] head,
  input  logic [N-1:0]     valid,
  input  logic [AW-1:0]    addr [N],
  input  logic [BW-1:0]    be   [N],
  input  logic [DW-1:0]    data [N],
  input  logic             ld_valid,
  input  logic [AW-1:0]    ld_addr,
  input  logic [BW-1:0]    ld_be,
  output logic             fwd_hit,
  output logic             fwd_partial,
  output logic [IDX_W-1:0] fwd_idx,
  output logic [DW-1:0]    fwd_data
);

  logic        match;
  logic [IDX_W-1:0] young;
  int unsigned slot;

  always_comb begin
    match = 1'b0;
    young = '0;
    slot  = 0;
    // Scan from the head (oldest) to the tail: the last match is the youngest.
    for (int unsigned k = 0; k < N; k++) begin
      slot = int'(head) + k;
      if (slot >= N) slot = slot - N;
      if (valid[slot] && (addr[slot] == ld_addr) && ((be[slot] & ld_be) != '0)) begin
        match = 1'b1;
        young = IDX_W'(slot);
      end
    end
    fwd_idx     = young;
    fwd_hit     = ld_valid && match && ((be[young] & ld_be) == ld_be);
    fwd_partial = ld_valid && match && ((be[young] & ld_be) != ld_be);
    fwd_data    = data[young];
  end

endmodule
