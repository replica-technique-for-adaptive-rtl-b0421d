// tb_test_controller: runs the test controller against an ideal memory and a
// replica stub whose failing cell the testbench chooses. Cycle by cycle it
// checks the initial write of all 64 rows (pattern, all ones in the victim
// row) and the replica initialisation, the exact Idle length before each
// CheckReplica, the Disturb and pseudo-write periods and targets, the serial
// replica readout, the early stop on RefreshNeeded, the RefreshReplica and
// the 128-cycle Read/write-back refresh with its per-bit results, BIST_PASS
// and DOUT, and the interrupt that ends the loop in Done.
module tb_test_controller;
  import gc_pkg::*;
  localparam int IDLE = 50, DIST = 7, PSEUDO = 11;
  localparam logic [AW-1:0] VICTIM = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, ext_interrupt = 0;
  cfg_t cfg;
  logic [COLS-1:0] rdata = '0, sram_wdata;
  logic refresh_needed = 0, sram_we, row_valid, bist_pass, bist_done;
  logic [AW-1:0] sram_addr;
  logic [3:0] dout_row;
  acc_t acc;
  state_e state;

  test_controller dut (.clk, .rst_n, .start, .ext_interrupt, .cfg, .rdata, .refresh_needed,
                       .acc, .sram_we, .sram_addr, .sram_wdata, .row_valid, .bist_pass,
                       .dout_row, .bist_done, .state);

  always #5 clk = ~clk;

  logic [COLS-1:0] mem [ROWS];
  logic fail_en = 0;
  int   fail_idx = 0;
  always @(posedge clk) begin
    if (acc.wen) mem[acc.waddr] <= acc.wdata;
    if (acc.ren) rdata <= mem[acc.raddr];
    refresh_needed <= acc.check_replica && fail_en && (int'(acc.rep_addr) == fail_idx);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // idle phase: counts its cycles and checks Disturb and pseudo-write timing
  int last_dist = -1, last_pseudo = -1, cyc = 0, n_dist = 0, n_pseudo = 0;
  task automatic idle_phase(output int len);
    len = 0;
    while (!acc.check_replica && !bist_done && len < 10000) begin
      ck(!acc.ren && !acc.refresh_replica, "no read or replica refresh in idle");
      if (acc.wen) begin
        ck(acc.waddr == VICTIM && acc.wdata == '1, "disturb writes ones to the victim row");
        if (last_dist >= 0 && len > 0) ck(cyc - last_dist == DIST, "disturb period");
        last_dist = cyc; n_dist++;
      end
      if (acc.pseudo_write) begin
        if (last_pseudo >= 0 && len > 0) ck(cyc - last_pseudo == PSEUDO, "pseudo-write period");
        last_pseudo = cyc; n_pseudo++;
      end
      len++; cyc++;
      @(negedge clk);
    end
    last_dist = -1; last_pseudo = -1;
  endtask

  logic [COLS-1:0] exp_row, exp_mm;
  int len, t0;
  initial begin
    cfg.idle_period = TW'(IDLE); cfg.disturb_period = TW'(DIST);
    cfg.pseudo_period = TW'(PSEUDO); cfg.victim_addr = VICTIM; cfg.pattern = 32'h5A0F_3C81;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    ck(!acc.wen && !acc.ren && state == ST_RESET, "waits for start");
    start = 1; @(negedge clk); start = 0;
    // initial write
    for (int r = 0; r < ROWS; r++) begin
      ck(acc.wen && acc.waddr == AW'(r), "initial write address");
      ck(acc.wdata == ((AW'(r) == VICTIM) ? '1 : cfg.pattern), "initial write data");
      @(negedge clk);
    end
    ck(acc.refresh_replica && !acc.wen, "replica initialised after array");
    @(negedge clk);
    for (int round = 0; round < 3; round++) begin
      idle_phase(len);
      ck(len == IDLE, $sformatf("idle length %0d", len));
      for (int i = 0; i < REPLICAS; i++) begin
        ck(acc.check_replica && int'(acc.rep_addr) == i, $sformatf("serial check of cell %0d", i));
        @(negedge clk);
      end
      ck(!acc.check_replica && state == ST_CHECK, "last result evaluated");
      @(negedge clk);
      ck(state == ST_IDLE, "back to idle with no replica failure");
    end
    // replica cell 9 fails, array row 20 bit 5 has been lost
    fail_en = 1; fail_idx = 9;
    idle_phase(len);
    ck(len == IDLE, "idle length before failing check");
    mem[20][5] = ~mem[20][5];
    for (int i = 0; i <= 9; i++) begin
      ck(acc.check_replica && int'(acc.rep_addr) == i, "serial check up to failing cell");
      @(negedge clk);
    end
    ck(refresh_needed && !acc.check_replica, "check stops at RefreshNeeded");
    @(negedge clk);
    fail_en = 0;
    ck(acc.refresh_replica && !acc.wen && !acc.ren, "RefreshReplica before the array refresh");
    @(negedge clk);
    t0 = cyc;
    for (int r = 0; r < ROWS; r++) begin
      ck(acc.ren && acc.raddr == AW'(r) && !acc.wen && !sram_we, "Read state");
      @(negedge clk);
      exp_row = mem[r];
      exp_mm  = (AW'(r) == VICTIM) ? '0 : (exp_row ^ cfg.pattern);
      ck(acc.wen && acc.waddr == AW'(r) && acc.wdata == exp_row, "write back the read data");
      ck(sram_we && sram_addr == AW'(r) && sram_wdata == exp_mm, "per-bit result to SRAM");
      ck(row_valid && bist_pass == (exp_mm == '0) && dout_row == exp_row[31:28], "BIST_PASS and DOUT");
      if (r == 20) ck(!bist_pass && sram_wdata == 32'h20, "lost bit reported");
      @(negedge clk);
    end
    ck(state == ST_IDLE, "refresh of 64 rows takes 128 cycles");
    // interrupt during idle
    repeat (10) @(negedge clk);
    ext_interrupt = 1; @(negedge clk); ext_interrupt = 0;
    @(negedge clk);
    ck(bist_done && state == ST_DONE, "interrupt leads to Done");
    for (int k = 0; k < 100; k++) begin
      ck(!acc.wen && !acc.ren && !acc.check_replica && !acc.pseudo_write && bist_done, "quiet in Done");
      @(negedge clk);
    end
    ck(n_dist > 10 && n_pseudo > 10, "disturb and pseudo-writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
