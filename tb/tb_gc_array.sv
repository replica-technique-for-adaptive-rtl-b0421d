// tb_gc_array: exercises the retention model of the gain-cell array with
// small thresholds (DRT_MIN 160 units, spread 25 %, so every threshold lies
// in 160..200; leakage 1 unit per cycle with WBL low and 16 with WBL high).
// Checks write/read with one-cycle read latency, that a '0' holds in standby
// below 160 cycles and is lost everywhere beyond 200, that a high WBL on its
// column makes it fail 16 times sooner, that only the columns whose WBL is
// high are stressed, that a '1' does not fail, and that a rewrite restores
// the cell.
module tb_gc_array;
  import gc_pkg::*;
  localparam int DRT = 160, SPREAD = 25, LL = 1, LH = 16;
  localparam int DRT_MAX = DRT + DRT * SPREAD / 100;
  int checks = 0, failures = 0;
  logic clk = 0, wen = 0, ren = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [COLS-1:0] wbl = '0, rdata;

  gc_array #(.DRT_MIN(DRT), .SPREAD_PCT(SPREAD), .LEAK_LOW(LL), .LEAK_HIGH(LH)) dut (
    .clk, .wen, .waddr, .wbl, .ren, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [COLS-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin failures++; $display("%s: read %h expected %h", what, rdata, exp); end
  endtask

  int first_fail;
  initial begin
    @(negedge clk);
    // ones first (their high WBL would stress zeros), then zeros
    for (int r = 1; r < ROWS; r += 2) begin wen = 1; waddr = AW'(r); wbl = '1; @(negedge clk); end
    for (int r = 0; r < ROWS; r += 2) begin wen = 1; waddr = AW'(r); wbl = '0; @(negedge clk); end
    wen = 0; wbl = '0;
    for (int r = 0; r < ROWS; r++) begin
      ren = 1; raddr = AW'(r); @(negedge clk);
      chk(r[0] ? '1 : '0, "initial readback");
    end
    ren = 0;

    // standby retention of row 0, rewritten now
    wen = 1; waddr = 0; wbl = '0; @(negedge clk); wen = 0;
    first_fail = -1;
    for (int k = 1; k <= DRT_MAX + 20; k++) begin
      ren = 1; raddr = 0; @(negedge clk);
      if (k < DRT - 5) chk('0, "standby below threshold");
      if (k > DRT_MAX + 5) chk('1, "standby beyond threshold");
      if (first_fail < 0 && rdata != '0) first_fail = k;
    end
    checks++;
    if (first_fail < DRT - 5 || first_fail > DRT_MAX + 5) begin
      failures++; $display("first standby failure at %0d", first_fail);
    end
    // a stored '1' (row 1, written long ago) is still intact
    raddr = 1; @(negedge clk); chk('1, "stored one");

    // WBL high: keep writing ones to row 2 while row 3 holds zeros
    wen = 1; waddr = 3; wbl = '0; @(negedge clk);
    first_fail = -1;
    for (int k = 1; k <= DRT_MAX / LH + 6; k++) begin
      wen = 1; waddr = 2; wbl = '1; ren = 1; raddr = 3; @(negedge clk);
      if (k < DRT / LH - 1) chk('0, "write-disturb below threshold");
      if (k > DRT_MAX / LH + 2) chk('1, "write-disturb beyond threshold");
      if (first_fail < 0 && rdata != '0) first_fail = k;
    end
    checks++;
    if (first_fail < DRT / LH - 1 || first_fail > DRT_MAX / LH + 2) begin
      failures++; $display("first write-disturb failure at %0d", first_fail);
    end

    // only the columns whose WBL is high are stressed
    wen = 1; waddr = 4; wbl = '0; @(negedge clk);
    for (int k = 0; k < DRT_MAX / LH + 4; k++) begin wen = 1; waddr = 5; wbl = 32'h0000_FFFF; @(negedge clk); end
    wen = 0; ren = 1; raddr = 4; @(negedge clk);
    chk(32'h0000_FFFF, "column-selective disturb");

    // rewriting restores the cell
    wen = 1; waddr = 3; wbl = '0; ren = 0; @(negedge clk);
    wen = 0; ren = 1; raddr = 3; @(negedge clk);
    chk('0, "rewrite restores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
