// tb_roow_store_unit: end-to-end test of the ROOW store path at its default
// size (56-entry store buffer, four-stage cache pipeline), with a behavioural
// L1 cache (l1_model) behind it.
//
// Phase 1 (directed, the four-store example of the design): stores A and C
// miss, B and D hit.  Run once as SYNC stores and once as DRF stores; the DRF
// run must finish sooner, B must write before A, and a lone hit must be
// performed four cycles after it is initiated.
//
// Phase 2 (random): a stream of stores to a small set of addresses, split
// into regions by random setDRF 0/1 and explicit fences, with random load
// searches every cycle.  Checked against a program-order model:
//   - SYNC stores write in program order among themselves;
//   - no store writes before every store ahead of its fence has written;
//   - each word is written by its stores in program order, and the final
//     memory equals program-order execution;
//   - stores retire in order and only after writing;
//   - load searches return the youngest overlapping store in the buffer.
// Every mechanism (sync squash, sync stall, fence stall, out-of-order DRF
// write, retention and eviction of performed DRF stores, forwarding from a
// performed store, full-buffer stall, partial overlap) is counted, and one
// that never happened counts as a failure.
module tb_roow_store_unit;
  import roow_pkg::*;

  localparam int unsigned N     = SB_ENTRIES;
  localparam int unsigned IDX_W = $clog2(N);
  localparam int unsigned CNT_W = $clog2(N + 1);
  localparam int unsigned AW    = WADDR_W;
  localparam int unsigned DW    = DATA_W;
  localparam int unsigned BW    = BE_W;
  localparam int unsigned NST   = 6000;   // random stores
  localparam int unsigned WORDS = 48;     // random address range (6 lines)

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             st_valid = 1'b0, st_ready;
  logic [AW-1:0]    st_addr = '0;
  logic [DW-1:0]    st_data = '0;
  logic [BW-1:0]    st_be = '0;
  logic             setdrf_commit = 1'b0, setdrf_val = 1'b0, fence_commit = 1'b0;
  logic             ld_valid = 1'b0, ld_fwd_hit, ld_fwd_partial;
  logic [AW-1:0]    ld_addr = '0;
  logic [BW-1:0]    ld_be = '0;
  logic [DW-1:0]    ld_fwd_data;
  logic [IDX_W-1:0] ld_fwd_idx;
  logic             lk_valid, lk_hit, fill_valid;
  logic [IDX_W-1:0] lk_idx, fill_idx, retire_idx;
  mode_e            lk_mode;
  logic [AW-1:0]    lk_addr;
  logic [DW-1:0]    lk_data;
  logic [BW-1:0]    lk_be;
  logic             region_flag, sb_full, sync_miss_pend, fence_pending, retire_valid;
  logic [CNT_W-1:0] sb_count;
  logic             ev_full_stall, ev_sync_squash, ev_sync_stall, ev_fence_stall, ev_drf_evict;
  logic             evict_en = 1'b0;

  roow_store_unit dut (.*);

  l1_model #(.IDX_W(IDX_W), .AW(AW), .DW(DW), .MEM_WORDS(256)) u_l1 (
    .clk, .rst_n, .evict_en, .lk_valid, .lk_idx, .lk_addr, .lk_data, .lk_be, .lk_hit,
    .fill_valid, .fill_idx
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------------
  // Program-order record of committed stores, indexed by sequence number.
  localparam int unsigned MAXS = NST + 64;
  logic [AW-1:0]   s_addr  [MAXS];
  logic [DW-1:0]   s_data  [MAXS];
  logic [BW-1:0]   s_be    [MAXS];
  logic            s_drf   [MAXS];
  int unsigned     s_fence [MAXS];   // stores below this number must write first
  logic            s_wr    [MAXS];
  longint unsigned s_wtime [MAXS];
  int unsigned     slot_seq[N];
  int unsigned     n_commit = 0, n_retired = 0, n_written = 0;
  int unsigned     first_unwritten = 0, first_unwritten_sync = 0;
  int              last_writer [256];
  // model of the region flag and fence as the core sees them
  logic            m_flag = 1'b0;
  int unsigned     m_fence_at = 0;
  logic            m_fence_pend = 1'b0;

  // mechanism counters
  int n_squash = 0, n_sstall = 0, n_fstall = 0, n_evict = 0, n_full = 0;
  int n_ooo = 0, n_fwd = 0, n_fwd_done = 0, n_partial = 0, n_set1 = 0, n_set0 = 0;
  int n_retained = 0;

  function automatic logic overlaps(input int unsigned s, input logic [AW-1:0] a, input logic [BW-1:0] b);
    return (s_addr[s] == a) && ((s_be[s] & b) != '0);
  endfunction

  // Writes: a lookup hit writes at this edge, a fill reports a write done.
  task automatic note_write(input logic [IDX_W-1:0] slot);
    int unsigned s;
    int w;
    s = slot_seq[slot];
    while (first_unwritten_sync < n_commit && (s_wr[first_unwritten_sync] || s_drf[first_unwritten_sync]))
      first_unwritten_sync++;
    chk(!s_wr[s], $sformatf("store %0d written twice", s));
    chk(first_unwritten >= s_fence[s] || first_unwritten == s,
        $sformatf("store %0d wrote before stores ahead of its fence (first unwritten %0d, fence at %0d)",
                  s, first_unwritten, s_fence[s]));
    if (!s_drf[s]) chk(first_unwritten_sync == s,
                       $sformatf("SYNC store %0d wrote out of order (first unwritten sync %0d)", s, first_unwritten_sync));
    w = int'(s_addr[s]) % 256;
    chk(last_writer[w] < int'(s), $sformatf("word %0d: store %0d after store %0d", w, s, last_writer[w]));
    last_writer[w] = int'(s);
    if (s_drf[s] && first_unwritten < s) n_ooo++;
    s_wr[s] = 1'b1;
    s_wtime[s] = cyc;
    n_written++;
    while (first_unwritten < n_commit && s_wr[first_unwritten]) first_unwritten++;
    while (first_unwritten_sync < n_commit && (s_wr[first_unwritten_sync] || s_drf[first_unwritten_sync]))
      first_unwritten_sync++;
  endtask

  // Sampled just before each rising edge.
  always @(posedge clk) if (rst_n) begin
    // Load search against the buffer content.
    if (ld_valid) begin
      logic eh, ep;
      logic [DW-1:0] ed;
      int unsigned es;
      eh = 1'b0; ep = 1'b0; ed = '0; es = 0;
      for (int unsigned s = n_commit; s > n_retired; s--) begin
        if (overlaps(s - 1, ld_addr, ld_be)) begin
          eh = ((s_be[s-1] & ld_be) == ld_be);
          ep = !eh;
          ed = s_data[s-1];
          es = s - 1;
          break;
        end
      end
      chk(ld_fwd_hit == eh && ld_fwd_partial == ep && (!eh || ld_fwd_data == ed),
          $sformatf("load search %0h/%0h: hit %0b partial %0b data %h, expected %0b %0b %h",
                    ld_addr, ld_be, ld_fwd_hit, ld_fwd_partial, ld_fwd_data, eh, ep, ed));
      if (eh) begin
        n_fwd++;
        if (s_wr[es]) n_fwd_done++;
      end
      if (ep) n_partial++;
    end
    // Writes.
    if (lk_valid && lk_hit) note_write(lk_idx);
    // Retirement: in order, only after the write.
    if (retire_valid) begin
      chk(slot_seq[retire_idx] == n_retired, "retire out of order");
      chk(s_wr[n_retired] || (fill_valid && slot_seq[fill_idx] == n_retired),
          $sformatf("store %0d retired before writing", n_retired));
      n_retired++;
    end
    // Commit of a store.
    if (st_valid && st_ready) begin
      slot_seq[n_commit % N] = n_commit;
      n_commit++;
    end
    if (ev_sync_squash) n_squash++;
    if (ev_sync_stall)  n_sstall++;
    if (ev_fence_stall) n_fstall++;
    if (ev_drf_evict)   n_evict++;
    if (ev_full_stall)  n_full++;
    if (sb_count > 0 && !retire_valid && u_dutsb_head_done()) n_retained++;
  end
  // Fills are reported one cycle after the write; counted at the same edge.
  always @(posedge clk) if (rst_n && fill_valid) note_write(fill_idx);

  function automatic logic u_dutsb_head_done();
    return dut.u_sb.valid[dut.u_sb.head] && dut.u_sb.performed[dut.u_sb.head];
  endfunction

  // ---------------------------------------------------------------------
  // Core side.
  task automatic commit_store(input logic [AW-1:0] a, input logic [DW-1:0] d, input logic [BW-1:0] b);
    int unsigned s;
    s = n_commit;
    s_addr[s] = a; s_data[s] = d; s_be[s] = b; s_drf[s] = m_flag; s_wr[s] = 1'b0;
    s_fence[s] = m_fence_at;
    if (m_fence_pend) begin s_fence[s] = s; m_fence_at = s; m_fence_pend = 1'b0; end
    st_valid = 1'b1; st_addr = a; st_data = d; st_be = b;
    do @(posedge clk); while (!st_ready);
    #1;
    st_valid = 1'b0;
  endtask

  task automatic set_drf(input logic v);
    setdrf_commit = 1'b1; setdrf_val = v;
    @(posedge clk); #1;
    setdrf_commit = 1'b0;
    m_flag = v; m_fence_pend = 1'b1;
    if (v) n_set1++; else n_set0++;
  endtask

  task automatic fence_now();
    fence_commit = 1'b1;
    @(posedge clk); #1;
    fence_commit = 1'b0;
    m_fence_pend = 1'b1;
  endtask

  task automatic wait_written(input int unsigned upto);
    while (first_unwritten < upto) @(posedge clk);
    #1;
  endtask

  // Four stores A..D: A and C to lines without permission, B and D to lines
  // holding it.  Returns the cycles from A's commit to the last write.
  task automatic four_stores(input int unsigned base_line, output longint unsigned span,
                             output logic b_before_a);
    int unsigned s0;
    longint unsigned t0;
    s0 = n_commit;
    t0 = cyc;
    commit_store(AW'((base_line + 1) * 8), 64'hA, 8'hFF);  // A: odd line, miss
    commit_store(AW'((base_line + 0) * 8), 64'hB, 8'hFF);  // B: even line, hit
    commit_store(AW'((base_line + 3) * 8), 64'hC, 8'hFF);  // C: odd line, miss
    commit_store(AW'((base_line + 2) * 8), 64'hD, 8'hFF);  // D: even line, hit
    wait_written(s0 + 4);
    span = s_wtime[s0 + 3] > s_wtime[s0 + 2] ? s_wtime[s0 + 3] : s_wtime[s0 + 2];
    if (s_wtime[s0] > span) span = s_wtime[s0];
    span = span - t0;
    b_before_a = s_wtime[s0 + 1] < s_wtime[s0];
  endtask

  initial begin
    longint unsigned span_sync, span_drf, t_iss, t_done;
    logic            ba_sync, ba_drf;
    for (int w = 0; w < 256; w++) last_writer[w] = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // Hit latency: initiation (the cycle after commit) to performed.
    commit_store(AW'(16), 64'h1, 8'hFF);
    t_iss = cyc;
    wait_written(1);
    t_done = s_wtime[0];
    chk(t_done - t_iss == longint'(CACHE_STAGES),
        $sformatf("hit latency %0d cycles, expected %0d", t_done - t_iss, CACHE_STAGES));

    // Phase 1: the four-store example, SYNC then DRF (fresh lines each time).
    four_stores(4, span_sync, ba_sync);
    set_drf(1'b1);
    four_stores(8, span_drf, ba_drf);
    set_drf(1'b0);
    $display("four stores: SYNC %0d cycles, DRF %0d cycles", span_sync, span_drf);
    chk(!ba_sync, "SYNC: B must not write before A");
    chk(ba_drf, "DRF: B should write before A misses back");
    chk(span_drf < span_sync, "DRF run should finish before the SYNC run");
    wait_written(n_commit);

    // Phase 2: random regions.
    evict_en = 1'b1;
    begin
      int unsigned left = 0;
      for (int unsigned i = 0; i < NST; i++) begin
        if (left == 0) begin
          set_drf(!m_flag);
          left = m_flag ? $urandom_range(10, 120) : $urandom_range(1, 10);
        end
        left--;
        if ($urandom_range(0, 99) == 0) fence_now();
        ld_valid = 1'b1;
        ld_addr  = AW'($urandom_range(0, WORDS - 1));
        ld_be    = ($urandom_range(0, 3) == 0) ? 8'h0F : 8'hFF;
        commit_store(AW'($urandom_range(0, WORDS - 1)), {$urandom, $urandom},
                     ($urandom_range(0, 7) == 0) ? 8'hF0 : 8'hFF);
        if ($urandom_range(0, 3) == 0) begin
          repeat ($urandom_range(1, 3)) @(posedge clk);
          #1;
        end
      end
      ld_valid = 1'b0;
      set_drf(1'b0);
    end
    wait_written(n_commit);
    repeat (10) @(posedge clk);

    // Final memory against program order.
    begin
      logic [DW-1:0] ref_mem [256];
      for (int w = 0; w < 256; w++) ref_mem[w] = '0;
      for (int unsigned s = 0; s < n_commit; s++)
        for (int b = 0; b < int'(BW); b++)
          if (s_be[s][b]) ref_mem[int'(s_addr[s]) % 256][8*b +: 8] = s_data[s][8*b +: 8];
      for (int w = 0; w < 256; w++)
        chk(u_l1.mem[w] == ref_mem[w], $sformatf("final memory word %0d", w));
    end
    chk(n_written == n_commit, "every store written once");

    $display("stores %0d, squashes %0d, sync stalls %0d, fence stalls %0d, out-of-order DRF writes %0d",
             n_commit, n_squash, n_sstall, n_fstall, n_ooo);
    $display("full stalls %0d, DRF evictions %0d, forwards %0d (from written stores %0d), partial %0d, retained-head cycles %0d",
             n_full, n_evict, n_fwd, n_fwd_done, n_partial, n_retained);
    chk(n_squash > 0,   "SYNC-miss squash never happened");
    chk(n_sstall > 0,   "stall behind a SYNC miss never happened");
    chk(n_fstall > 0,   "fence stall never happened");
    chk(n_ooo > 0,      "out-of-order DRF write never happened");
    chk(n_full > 0,     "full-buffer stall never happened");
    chk(n_evict > 0,    "eviction of a performed DRF store never happened");
    chk(n_retained > 0, "performed DRF store never retained");
    chk(n_fwd_done > 0, "forwarding from a performed store never happened");
    chk(n_partial > 0,  "partial-overlap load never happened");
    chk(n_set1 > 0 && n_set0 > 0, "region switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
