// tb_replica_column: small thresholds (DRT_MIN 320 units, spread 10 %, so
// 320..352; 1 unit per cycle with the replica WBL low, 16 with it high).
// Checks that a RefreshReplica clears all 32 cells in one cycle, that a full
// serial check finds no failing cell well before the threshold and all 32
// well after it, that a high replica WBL makes the cells fail 16 times
// sooner, that refresh_needed answers a check one cycle later, and that it is
// low after cycles without a check.
module tb_replica_column;
  import gc_pkg::*;
  localparam int DRT = 320, SPREAD = 10, LL = 1, LH = 16;
  int checks = 0, failures = 0;
  logic clk = 0, refresh_replica = 0, wbl_rep = 0, check_replica = 0;
  logic [RAW-1:0] rep_addr = '0;
  logic refresh_needed;

  replica_column #(.DRT_MIN(DRT), .SPREAD_PCT(SPREAD), .LEAK_LOW(LL), .LEAK_HIGH(LH)) dut (
    .clk, .refresh_replica, .wbl_rep, .check_replica, .rep_addr, .refresh_needed);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reads all cells serially; returns how many read '1'. expect_all: 1 =
  // every cell must fail, 0 = none may, 2 = no per-cell expectation
  task automatic scan_all(output int nfail, input int expect_all = 2);
    nfail = 0;
    for (int i = 0; i <= REPLICAS; i++) begin
      check_replica = (i < REPLICAS); rep_addr = RAW'(i);
      @(negedge clk);
      if (i < REPLICAS && refresh_needed) nfail++;
      if (i < REPLICAS && expect_all != 2) begin
        checks++;
        if (refresh_needed !== expect_all[0]) begin
          failures++; $display("replica cell %0d read %b, expected %0d", i, refresh_needed, expect_all);
        end
      end
    end
    check_replica = 0;
  endtask

  int nf;
  initial begin
    @(negedge clk);
    refresh_replica = 1; @(negedge clk); refresh_replica = 0;
    scan_all(nf);
    checks++; if (nf != 0) begin failures++; $display("fresh replica: %0d failing", nf); end
    repeat (200) @(negedge clk);
    scan_all(nf);
    checks++; if (nf != 0) begin failures++; $display("below threshold: %0d failing", nf); end
    repeat (150) @(negedge clk);
    checks++; if (refresh_needed !== 1'b0) begin failures++; $display("refresh_needed high without check"); end
    scan_all(nf, 1);
    checks++; if (nf != REPLICAS) begin failures++; $display("beyond threshold: %0d failing", nf); end
    // one-cycle latency on a failing cell
    check_replica = 1; rep_addr = 5; @(negedge clk); check_replica = 0;
    checks++; if (refresh_needed !== 1'b1) begin failures++; $display("no answer one cycle after check"); end
    @(negedge clk);
    checks++; if (refresh_needed !== 1'b0) begin failures++; $display("answer held past one cycle"); end
    // single-cycle RefreshReplica clears all cells
    refresh_replica = 1; @(negedge clk); refresh_replica = 0;
    scan_all(nf, 0);
    checks++; if (nf != 0) begin failures++; $display("after refresh: %0d failing", nf); end
    // high replica WBL: about 16x faster
    refresh_replica = 1; @(negedge clk); refresh_replica = 0;
    wbl_rep = 1; repeat (DRT / LH - 4) @(negedge clk); wbl_rep = 0;
    scan_all(nf);
    checks++; if (nf != 0) begin failures++; $display("WBL high below threshold: %0d failing", nf); end
    wbl_rep = 1; repeat (8) @(negedge clk); wbl_rep = 0;
    scan_all(nf);
    checks++; if (nf != REPLICAS) begin failures++; $display("WBL high beyond threshold: %0d failing", nf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
