// tb_roow_issue_select: self-checking test of in-order store initiation.
// Directed cases reproduce the store-buffer states of the ROOW examples (a
// sync miss at the head holding the sync stores behind it, DRF stores going
// ahead, a fence holding a DRF store until every older store has performed);
// then random buffer states are compared with a reference written as a
// straightforward walk from the head.
module tb_roow_issue_select;
  import roow_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned IW = 3;

  logic [IW-1:0] head;
  logic [N-1:0]  valid, issued, performed, mode, fence;
  logic          sync_block;
  logic          issue_valid, stall_sync, stall_fence;
  logic [IW-1:0] issue_idx;
  int            checks = 0, failures = 0;

  roow_issue_select #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_issue(input logic v, input logic [IW-1:0] idx,
                              input logic ss, input logic sf, input string what);
    #1;
    checks++;
    if (issue_valid !== v || (v && issue_idx !== idx) || stall_sync !== ss || stall_fence !== sf) begin
      failures++;
      $display("FAIL %s: valid=%0b idx=%0d ss=%0b sf=%0b (exp %0b %0d %0b %0b)",
               what, issue_valid, issue_idx, stall_sync, stall_fence, v, idx, ss, sf);
    end
  endtask

  // Reference: walk from the head.
  task automatic reference(output logic v, output logic [IW-1:0] idx,
                           output logic ss, output logic sf);
    logic older = 1'b0;
    v = 0; idx = 0; ss = 0; sf = 0;
    for (int k = 0; k < N; k++) begin
      int s = (int'(head) + k) % N;
      if (valid[s] && !issued[s] && !performed[s]) begin
        idx = IW'(s);
        ss  = !mode[s] && sync_block;
        sf  = fence[s] && older;
        v   = !ss && !sf;
        return;
      end
      if (valid[s] && !performed[s]) older = 1'b1;
    end
  endtask

  initial begin
    logic ev, ess, esf;
    logic [IW-1:0] eidx;
    // Slots 0..5 = A..F, head at 0.  A,B,C sync; D,E,F DRF (Figure 5 layout).
    head = 0; valid = 8'b0011_1111; performed = '0; fence = '0;
    mode = 8'b0011_1000;
    // (a) A,B,C,D issued, no miss: next is E.
    issued = 8'b0000_1111; sync_block = 0;
    expect_issue(1, 3'd4, 0, 0, "before miss: next is E");
    // (b) A missed: B,C squashed (issued cleared), D still issued.  B is the
    // oldest not issued and is held, so E waits behind it.
    issued = 8'b0000_1001; sync_block = 1;
    expect_issue(0, 3'd1, 1, 0, "after miss: B held");
    // Miss resolved: B goes again.
    sync_block = 0; performed = 8'b0000_0001;
    expect_issue(1, 3'd1, 0, 0, "miss resolved: B re-initiated");
    // DRF store with a miss outstanding is not held.
    issued = 8'b0000_0111; performed = 8'b0000_0000; sync_block = 1;
    expect_issue(1, 3'd3, 0, 0, "DRF store goes under sync miss");
    // Figure 6: A,B,C sync, A' (slot 3) DRF behind a fence.
    fence = 8'b0000_1000; issued = 8'b0000_0111; sync_block = 0;
    performed = 8'b0000_0011;
    expect_issue(0, 3'd3, 0, 1, "fence holds A' while C not performed");
    performed = 8'b0000_0111;
    expect_issue(1, 3'd3, 0, 0, "fence releases A'");
    // Wrap-around: head at 6.
    head = 6; valid = 8'b1100_0011; issued = 8'b0100_0000; performed = 8'b0100_0000;
    mode = '1; fence = '0;
    expect_issue(1, 3'd7, 0, 0, "wrap: slot 7 next");
    issued = 8'b1100_0000; performed = 8'b1100_0000;
    expect_issue(1, 3'd0, 0, 0, "wrap: slot 0 next");
    valid = '0;
    expect_issue(0, 3'd0, 0, 0, "empty");

    for (int i = 0; i < 20000; i++) begin
      head = IW'($urandom_range(0, N - 1));
      valid = N'($urandom); issued = N'($urandom); performed = N'($urandom) & N'($urandom);
      mode = N'($urandom); fence = N'($urandom) & N'($urandom); sync_block = $urandom_range(0, 1);
      reference(ev, eidx, ess, esf);
      expect_issue(ev, eidx, ess, esf, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
