// tb_roow_sb_forward: self-checking test of the store-to-load forwarding
// search.  Fills an 8-entry buffer with random stores to a few word
// addresses (so that several stores to one word coexist) and random byte
// enables, with random head/valid patterns, and compares hit/partial/data
// with a reference that walks from the tail backwards to the first store
// that overlaps the load.
module tb_roow_sb_forward;
  import roow_pkg::*;

  localparam int unsigned N = 8, IW = 3, AW = 6, DW = 64, BW = 8;

  logic [IW-1:0] head;
  logic [N-1:0]  valid;
  logic [AW-1:0] addr [N];
  logic [BW-1:0] be   [N];
  logic [DW-1:0] data [N];
  logic          ld_valid;
  logic [AW-1:0] ld_addr;
  logic [BW-1:0] ld_be;
  logic          fwd_hit, fwd_partial;
  logic [IW-1:0] fwd_idx;
  logic [DW-1:0] fwd_data;
  int            checks = 0, failures = 0;
  int            hits = 0, partials = 0;

  roow_sb_forward #(.N(N), .AW(AW), .DW(DW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic eh, ep;
      logic [DW-1:0] ed;
      int s;
      head = IW'($urandom_range(0, N - 1));
      valid = N'($urandom);
      for (int j = 0; j < N; j++) begin
        addr[j] = AW'($urandom_range(0, 3));
        be[j]   = ($urandom_range(0, 1) == 1) ? 8'hFF : BW'($urandom);
        data[j] = {$urandom, $urandom};
      end
      ld_valid = ($urandom_range(0, 7) != 0);
      ld_addr  = AW'($urandom_range(0, 3));
      ld_be    = ($urandom_range(0, 1) == 1) ? 8'h0F : BW'($urandom) | 8'h01;
      // Reference: youngest first, from the slot before the tail backwards.
      eh = 0; ep = 0; ed = '0;
      for (int k = N - 1; k >= 0; k--) begin
        s = (int'(head) + k) % N;
        if (valid[s] && addr[s] == ld_addr && (be[s] & ld_be) != 0) begin
          eh = ld_valid && ((be[s] & ld_be) == ld_be);
          ep = ld_valid && ((be[s] & ld_be) != ld_be);
          ed = data[s];
          break;
        end
      end
      #1;
      checks++;
      if (fwd_hit !== eh || fwd_partial !== ep || (eh && fwd_data !== ed)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: hit=%0b partial=%0b data=%h exp %0b %0b %h", fwd_hit, fwd_partial, fwd_data, eh, ep, ed);
      end
      hits += int'(eh);
      partials += int'(ep);
    end
    checks++;
    if (hits < 100 || partials < 100) begin
      failures++;
      $display("FAIL: too few hits (%0d) or partial overlaps (%0d)", hits, partials);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
