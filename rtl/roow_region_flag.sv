// roow_region_flag: the processor's one-bit region flag and the logical
// store-buffer fence it raises at region boundaries.
//
// The compiler brackets code with "setDRF 1" (start of a data-race-free
// region) and "setDRF 0" (start of a synchronization region).  The
// instruction is a no-op until it commits; at commit it writes its operand
// into the region flag.  Every store that commits afterwards copies the flag
// into the mode bit of its store-buffer entry.  The flag resets to 0 so that
// code without annotations keeps plain TSO behaviour.
//
// Following the document, committing setDRF also inserts a store-buffer fence
// (FENCE_ON_SETDRF = 1, fences on every region boundary).  An explicit fence
// instruction (fence_commit) does the same.  The fence is held as a pending
// bit and attached to the next store that enters the store buffer; that
// store may not start its cache write until every older store has performed.
// Holding the fence on the next store, rather than in a separate entry, is
// this design's choice.
//
// Timing: setdrf_commit/fence_commit take effect at the clock edge.  A store
// committing in the same cycle as setDRF or a fence is taken to be younger
// than them: store_mode and store_fence already show the new values
// (combinational bypass).  store_accept clears the pending fence.
module roow_region_flag
  import roow_pkg::*;
#(
  parameter bit FENCE_ON_SETDRF = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  setdrf_commit,  // a setDRF instruction commits this cycle
  input  logic  setdrf_val,     // its one-bit operand
  input  logic  fence_commit,   // an explicit store-buffer fence commits
  input  logic  store_accept,   // a store enters the store buffer this cycle
  output logic  region_flag,    // registered region flag
  output mode_e store_mode,     // mode bit for a store committing now
  output logic  store_fence,    // fence bit for a store committing now
  output logic  fence_pending   // registered: a fence waits for a store
);

  logic fence_now;

  assign fence_now   = fence_commit | (setdrf_commit & FENCE_ON_SETDRF);
  assign store_mode  = mode_e'(setdrf_commit ? setdrf_val : region_flag);
  assign store_fence = fence_pending | fence_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region_flag   <= 1'b0;
      fence_pending <= 1'b0;
    end else begin
      if (setdrf_commit) region_flag <= setdrf_val;
      if (store_accept)   fence_pending <= 1'b0;
      else if (fence_now) fence_pending <= 1'b1;
    end
  end

endmodule
