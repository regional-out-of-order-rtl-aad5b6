// tb_roow_store_buffer: directed, self-checking test of the dual-mode store
// buffer on its own (8 entries); the testbench plays the cache pipeline and
// the cache.
//   1. SYNC stores A,B,C and DRF stores D,E,F enter; they are initiated in
//      order, one per cycle.
//   2. A misses; B and C are squashed.  Their issued bits drop, D keeps its
//      own, and initiation stops at B (sync stall) until A completes; then B
//      and C are initiated again.
//   3. SYNC stores leave as soon as they perform; performed DRF stores stay
//      and still forward to loads.
//   4. A DRF store behind a fence waits until every older store has
//      performed; a performed SYNC store behind retained DRF stores drains
//      them.
//   5. A full buffer takes a new store only by evicting a performed DRF head.
module tb_roow_store_buffer;
  import roow_pkg::*;

  localparam int unsigned N = 8, S = 4, IW = 3, CW = 4, AW = 10, DW = 64, BW = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          st_valid = 1'b0, st_ready;
  logic [AW-1:0] st_addr = '0;
  logic [DW-1:0] st_data = '0;
  logic [BW-1:0] st_be = '1;
  mode_e         st_mode = MODE_SYNC;
  logic          st_fence = 1'b0;
  logic          iss_valid;
  logic [IW-1:0] iss_idx;
  mode_e         iss_mode;
  logic [AW-1:0] iss_addr;
  logic [DW-1:0] iss_data;
  logic [BW-1:0] iss_be;
  logic          hit_valid = 1'b0, miss_valid = 1'b0, fill_valid = 1'b0;
  logic [IW-1:0] hit_idx = '0, miss_idx = '0, fill_idx = '0;
  mode_e         miss_mode = MODE_SYNC;
  logic [S-1:0]  squash_valid = '0;
  logic [IW-1:0] squash_idx [S];
  logic          ld_valid = 1'b0;
  logic [AW-1:0] ld_addr = '0;
  logic [BW-1:0] ld_be = '1;
  logic          ld_fwd_hit, ld_fwd_partial;
  logic [DW-1:0] ld_fwd_data;
  logic [IW-1:0] ld_fwd_idx;
  logic [CW-1:0] count;
  logic          full, retire_valid, retire_evict, sync_miss_pend, stall_sync, stall_fence;
  logic [IW-1:0] retire_idx;

  int checks = 0, failures = 0, retires = 0;

  roow_store_buffer #(.N(N), .STAGES(S), .AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && retire_valid) retires++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Everything is driven just after the falling edge and checked 1 unit later.
  task automatic step();
    @(negedge clk);
    st_valid = 1'b0; hit_valid = 1'b0; miss_valid = 1'b0; fill_valid = 1'b0;
    squash_valid = '0; ld_valid = 1'b0;
  endtask

  task automatic settle();
    #1;
  endtask

  task automatic push(input logic [AW-1:0] a, input logic [DW-1:0] d, input mode_e m, input logic f);
    st_valid = 1'b1; st_addr = a; st_data = d; st_mode = m; st_fence = f;
  endtask

  initial begin
    for (int i = 0; i < int'(S); i++) squash_idx[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. A,B,C sync and D,E,F DRF, one per cycle; A is initiated the cycle
    //    after it enters, and so on in order.
    for (int i = 0; i < 6; i++) begin
      step();
      push(AW'(16 + i), DW'(64'hA0 + i), (i < 3) ? MODE_SYNC : MODE_DRF, 1'b0);
      settle();
      if (i == 0) chk(!iss_valid, "nothing to initiate in an empty buffer");
      else chk(iss_valid && iss_idx == IW'(i - 1), $sformatf("initiation %0d in order", i - 1));
    end
    step(); settle();
    chk(iss_valid && iss_idx == 3'd5 && iss_mode == MODE_DRF && iss_data == 64'hA5, "initiation of F");
    chk(count == 4'd6, "six stores held");

    // 2. A misses at the lookup, B and C are squashed in the pipeline.
    step();
    miss_valid = 1'b1; miss_idx = 3'd0; miss_mode = MODE_SYNC;
    squash_valid = 4'b0011; squash_idx[0] = 3'd2; squash_idx[1] = 3'd1;
    settle();
    chk(!iss_valid, "nothing left to initiate");
    step(); settle();
    chk(sync_miss_pend, "sync miss outstanding");
    chk(dut.issued[5:0] == 6'b111001, "A and D..F stay issued, B and C are cleared (Figure 5b)");
    chk(!iss_valid && stall_sync && !stall_fence, "B is held behind A's miss");
    // D hits meanwhile (a DRF store performs out of order), B still held.
    hit_valid = 1'b1; hit_idx = 3'd3;
    step(); settle();
    chk(!iss_valid && stall_sync, "B still held");
    chk(dut.performed[3] && !dut.performed[0], "D performed before A");
    // A completes.
    fill_valid = 1'b1; fill_idx = 3'd0;
    step(); settle();
    chk(!sync_miss_pend, "sync miss cleared");
    chk(iss_valid && iss_idx == 3'd1, "B initiated again after A");
    chk(retire_valid && retire_idx == 3'd0, "performed SYNC head A leaves at once");
    step(); settle();
    chk(iss_valid && iss_idx == 3'd2, "then C");
    hit_valid = 1'b1; hit_idx = 3'd1;
    step(); settle();
    chk(retire_valid && retire_idx == 3'd1, "B leaves");
    hit_valid = 1'b1; hit_idx = 3'd2;
    step();
    hit_valid = 1'b1; hit_idx = 3'd4;
    step();
    hit_valid = 1'b1; hit_idx = 3'd5;
    step(); settle();

    // 3. D,E,F performed and kept.
    chk(count == 4'd3 && !retire_valid, "performed DRF stores D,E,F retained");
    ld_valid = 1'b1; ld_addr = AW'(19); ld_be = 8'hFF;
    settle();
    chk(ld_fwd_hit && ld_fwd_data == 64'hA3 && ld_fwd_idx == 3'd3, "load forwarded from performed D");
    ld_addr = AW'(99);
    settle();
    chk(!ld_fwd_hit && !ld_fwd_partial, "no match for another address");

    // 4. Sync store G, then DRF store A' behind a fence (Figure 6).
    step();
    push(AW'(40), 64'hC0, MODE_SYNC, 1'b0);
    step();
    push(AW'(41), 64'hC1, MODE_DRF, 1'b1);
    settle();
    chk(iss_valid && iss_idx == 3'd6, "G initiated");
    step(); settle();
    chk(!iss_valid && stall_fence && !stall_sync, "A' held by the fence while G is in flight");
    step(); settle();
    chk(!iss_valid && stall_fence, "A' still held");
    hit_valid = 1'b1; hit_idx = 3'd6;
    step(); settle();
    chk(iss_valid && iss_idx == 3'd7, "A' initiated once G performed");
    chk(retire_valid && retire_idx == 3'd3, "performed G behind retained D drains D");
    step(); step(); step(); step(); settle();
    chk(count == 4'd1, "D,E,F,G left; A' remains");
    hit_valid = 1'b1; hit_idx = 3'd7;
    step(); settle();

    // 5. Fill the buffer with DRF stores, perform them all, then push more.
    for (int i = 0; i < 7; i++) begin
      step();
      push(AW'(60 + i), DW'(64'hD0 + i), MODE_DRF, 1'b0);
    end
    step();
    for (int i = 0; i < 7; i++) begin
      hit_valid = 1'b1; hit_idx = IW'(i);
      step();
    end
    settle();
    chk(full && count == 4'd8, "buffer full of performed DRF stores");
    chk(!retire_valid, "nothing leaves without need");
    push(AW'(80), 64'hE0, MODE_DRF, 1'b0);
    settle();
    chk(st_ready && retire_valid && retire_evict && retire_idx == 3'd7, "new store evicts the performed head");
    step(); settle();
    chk(full && count == 4'd8, "still full after the swap");
    push(AW'(81), 64'hE1, MODE_DRF, 1'b0);
    settle();
    chk(st_ready && retire_evict && retire_idx == 3'd0, "second eviction");
    step();
    // Now head is slot 1 (performed); slots 7 and 0 hold unperformed stores.
    // Perform nothing and keep evicting until the head is unperformed.
    for (int i = 1; i < 7; i++) begin
      push(AW'(90 + i), 64'hF0, MODE_DRF, 1'b0);
      step();
    end
    settle();
    push(AW'(99), 64'hF9, MODE_DRF, 1'b0);
    settle();
    chk(full && !st_ready && !retire_valid, "full with an unperformed head: the store waits");
    step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
