// tb_roow_size_sweep: runs one synthetic store stream through the store
// path in the configurations the design was evaluated in:
//   TSO ordering (no regions) and ROOW (regions, fences on every boundary)
//   at 16, 32 and 56 entries, and ROOW at 56 entries with fences left out.
// Each run must leave memory as program order would.  ROOW must not take
// longer than TSO at the same size, must need fewer cycles than TSO at 56
// entries even with 16 entries, and must stall commit less often.
module tb_roow_size_sweep;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int K = 7;
  logic   done [K];
  longint cyc  [K];
  int     err  [K];
  int     fst  [K];
  int     checks = 0, failures = 0;

  sweep_run #(.N(16), .REGIONS(1'b0)) r0 (.clk, .rst_n, .done(done[0]), .cycles(cyc[0]), .errors(err[0]), .full_stalls(fst[0]));
  sweep_run #(.N(32), .REGIONS(1'b0)) r1 (.clk, .rst_n, .done(done[1]), .cycles(cyc[1]), .errors(err[1]), .full_stalls(fst[1]));
  sweep_run #(.N(56), .REGIONS(1'b0)) r2 (.clk, .rst_n, .done(done[2]), .cycles(cyc[2]), .errors(err[2]), .full_stalls(fst[2]));
  sweep_run #(.N(16), .REGIONS(1'b1)) r3 (.clk, .rst_n, .done(done[3]), .cycles(cyc[3]), .errors(err[3]), .full_stalls(fst[3]));
  sweep_run #(.N(32), .REGIONS(1'b1)) r4 (.clk, .rst_n, .done(done[4]), .cycles(cyc[4]), .errors(err[4]), .full_stalls(fst[4]));
  sweep_run #(.N(56), .REGIONS(1'b1)) r5 (.clk, .rst_n, .done(done[5]), .cycles(cyc[5]), .errors(err[5]), .full_stalls(fst[5]));
  sweep_run #(.N(56), .REGIONS(1'b1), .FENCE_ON_SETDRF(1'b0)) r6 (.clk, .rst_n, .done(done[6]), .cycles(cyc[6]), .errors(err[6]), .full_stalls(fst[6]));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int k = 0; k < K; k++) all &= done[k];
    end while (!all);
    repeat (2) @(posedge clk);
    $display("entries  TSO cycles (full stalls)  ROOW cycles (full stalls)");
    for (int k = 0; k < 3; k++)
      $display("%4d     %8d (%6d)           %8d (%6d)", (k == 0) ? 16 : (k == 1) ? 32 : 56,
               cyc[k], fst[k], cyc[k+3], fst[k+3]);
    $display("56 entries, ROOW without fences: %0d cycles", cyc[6]);
    for (int k = 0; k < K; k++) chk(err[k] == 0, $sformatf("run %0d: %0d memory words differ", k, err[k]));
    for (int k = 0; k < 3; k++) begin
      chk(cyc[k+3] <= cyc[k], $sformatf("size %0d: ROOW slower than TSO", k));
      chk(fst[k+3] <= fst[k], $sformatf("size %0d: ROOW stalls more than TSO", k));
    end
    chk(cyc[3] < cyc[2], "16-entry ROOW not faster than 56-entry TSO");
    chk(cyc[6] <= cyc[5], "leaving out fences made ROOW slower");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
