// tb_roow_region_flag: self-checking test of the region flag and fence
// insertion.  Checks the reset value (0, TSO behaviour for unannotated code),
// then drives random setDRF, fence and store-commit pulses and compares the
// flag, the mode and fence bits handed to a committing store, and the pending
// fence against a reference model kept in the testbench.
module tb_roow_region_flag;
  import roow_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  setdrf_commit = 1'b0, setdrf_val = 1'b0, fence_commit = 1'b0, store_accept = 1'b0;
  logic  region_flag, store_fence, fence_pending;
  mode_e store_mode;
  int    checks = 0, failures = 0;

  logic  ref_flag, ref_pend;

  roow_region_flag dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    ref_flag = 1'b0;
    ref_pend = 1'b0;
    @(negedge clk);
    check(region_flag, 1'b0, "reset flag");
    check(store_mode, MODE_SYNC, "reset mode");
    check(store_fence, 1'b0, "reset fence");

    // Directed: Figure-4-like sequence. setDRF 1, then a store is DRF and fenced,
    // the store after it is DRF and not fenced.
    setdrf_commit = 1'b1; setdrf_val = 1'b1;
    @(negedge clk);
    setdrf_commit = 1'b0;
    check(region_flag, 1'b1, "flag after setDRF 1");
    check(fence_pending, 1'b1, "fence pending after setDRF 1");
    store_accept = 1'b1;
    check(store_mode, MODE_DRF, "first DRF store mode");
    check(store_fence, 1'b1, "first DRF store fenced");
    @(negedge clk);
    check(store_mode, MODE_DRF, "second DRF store mode");
    check(store_fence, 1'b0, "second DRF store not fenced");
    @(negedge clk);
    store_accept = 1'b0;
    ref_flag = 1'b1;
    ref_pend = 1'b0;

    // Random.
    for (int i = 0; i < 4000; i++) begin
      setdrf_commit = ($urandom_range(0, 3) == 0);
      setdrf_val    = $urandom_range(0, 1);
      fence_commit  = ($urandom_range(0, 5) == 0);
      store_accept  = ($urandom_range(0, 1) == 1);
      #1;
      check(store_mode, setdrf_commit ? setdrf_val : ref_flag, "bypassed mode");
      check(store_fence, ref_pend | fence_commit | setdrf_commit, "bypassed fence");
      check(region_flag, ref_flag, "region flag");
      check(fence_pending, ref_pend, "fence pending");
      if (setdrf_commit) ref_flag = setdrf_val;
      if (store_accept) ref_pend = 1'b0;
      else if (fence_commit | setdrf_commit) ref_pend = 1'b1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
