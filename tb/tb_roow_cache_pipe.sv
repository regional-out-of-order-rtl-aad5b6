// tb_roow_cache_pipe: self-checking test of the cache store pipeline.
// Random stores (random SYNC/DRF mode) are initiated with a random gap and
// the cache answers hit or miss at random.  A cycle-indexed record of what
// was initiated gives the expected content of the lookup stage (the store
// initiated four cycles earlier, unless squashed), the hit/miss reports, and
// exactly which younger SYNC stores a SYNC miss must squash.  Also checks
// the four-cycle hit latency with a lone store.
module tb_roow_cache_pipe;
  import roow_pkg::*;

  localparam int unsigned S = 4, N = 16, IW = 4, AW = 8, DW = 64, BW = 8;
  localparam int unsigned CYC = 6000;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid = 1'b0;
  logic [IW-1:0] in_idx = '0;
  mode_e         in_mode = MODE_SYNC;
  logic [AW-1:0] in_addr = '0;
  logic [DW-1:0] in_data = '0;
  logic [BW-1:0] in_be = '0;
  logic          lk_valid, lk_hit = 1'b0;
  logic [IW-1:0] lk_idx;
  mode_e         lk_mode;
  logic [AW-1:0] lk_addr;
  logic [DW-1:0] lk_data;
  logic [BW-1:0] lk_be;
  logic          hit_valid, miss_valid;
  logic [IW-1:0] hit_idx, miss_idx;
  mode_e         miss_mode;
  logic [S-1:0]  squash_valid;
  logic [IW-1:0] squash_idx [S];

  int checks = 0, failures = 0, n_squash = 0, n_drf_kept = 0;

  // Record of initiations by cycle.
  logic          r_v   [CYC];
  logic [IW-1:0] r_idx [CYC];
  mode_e         r_mode[CYC];
  logic [DW-1:0] r_data[CYC];
  logic          r_sq  [CYC];

  roow_cache_pipe #(.STAGES(S), .N(N), .AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what, input int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d: %s", c, what);
    end
  endtask

  initial begin
    int t0, tl;
    for (int c = 0; c < CYC; c++) begin r_v[c] = 0; r_sq[c] = 0; r_idx[c] = 0; r_mode[c] = MODE_SYNC; r_data[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Latency of a lone hit.
    in_valid = 1'b1; in_idx = 4'd5; in_mode = MODE_SYNC; in_data = 64'h1234;
    t0 = 0; tl = -1;
    @(negedge clk);
    in_valid = 1'b0;
    for (int k = 1; k <= 8; k++) begin
      lk_hit = 1'b1;
      #1;
      if (hit_valid && tl < 0) tl = k;
      @(negedge clk);
    end
    chk(tl == int'(S), $sformatf("hit latency %0d, expected %0d", tl, S), 0);

    // Random traffic.
    for (int c = 0; c < CYC; c++) begin
      logic sync_miss;
      r_v[c]    = ($urandom_range(0, 3) != 0);
      r_idx[c]  = IW'(c);
      r_mode[c] = mode_e'($urandom_range(0, 1));
      r_data[c] = {$urandom, $urandom};
      in_valid = r_v[c]; in_idx = r_idx[c]; in_mode = r_mode[c]; in_data = r_data[c];
      in_addr = AW'(c); in_be = 8'hFF;
      lk_hit = ($urandom_range(0, 2) != 0);
      #1;
      // The lookup stage holds what was initiated S cycles ago, unless squashed.
      if (c >= int'(S)) begin
        logic ev;
        ev = r_v[c-S] && !r_sq[c-S];
        chk(lk_valid == ev, "lookup valid", c);
        if (ev) begin
          chk(lk_idx == r_idx[c-S] && lk_mode == r_mode[c-S] && lk_data == r_data[c-S], "lookup payload", c);
          chk(hit_valid == lk_hit && miss_valid == !lk_hit, "hit/miss report", c);
        end
        sync_miss = ev && !lk_hit && (r_mode[c-S] == MODE_SYNC);
        // Expected squashes: stage i holds the store initiated at c-1-i,
        // slot S-1 the store entering now.
        for (int i = 0; i < int'(S); i++) begin
          int ci;
          logic es;
          ci = (i == int'(S) - 1) ? c : c - 1 - i;
          es = sync_miss && r_v[ci] && !r_sq[ci] && (r_mode[ci] == MODE_SYNC);
          chk(squash_valid[i] == es, $sformatf("squash slot %0d", i), c);
          if (es) begin
            chk(squash_idx[i] == r_idx[ci], "squash index", c);
            r_sq[ci] = 1'b1;
            n_squash++;
          end
          if (sync_miss && r_v[ci] && !r_sq[ci] && r_mode[ci] == MODE_DRF) n_drf_kept++;
        end
      end
      @(negedge clk);
    end
    chk(n_squash > 50, $sformatf("squashes seen: %0d", n_squash), CYC);
    chk(n_drf_kept > 50, $sformatf("DRF stores kept past a sync miss: %0d", n_drf_kept), CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
