// tb_gc_edram_testchip: end-to-end test of the test chip at its default
// parameters.
//   1. Direct mode: rows written and read back over the external pins.
//   2. Scan mode: a write and a read set up through the configuration scan
//      chain; the read word is captured into the chain and shifted out.
//   3. Controller mode with the pattern all zeros (the weak state) and a
//      Disturb every 10 cycles (10 % write activity): after the initial
//      write, the replica column has to ask for refreshes, and every refresh
//      must find the array intact. The refresh period is measured.
//   4. Pseudo-writes every 20 cycles added (calibration): the period must
//      shrink.
//   5. A Disturb in every cycle (100 % write activity): the period must
//      shrink by more than 5x against step 3, and the data must still hold.
//   6. A wrong word is slipped into row 7 in direct mode; the next refresh
//      must report it on BIST_PASS and DOUT.
//   7. Interrupt: Done, then the comparison SRAM is flushed over DOUT and
//      must hold exactly the error of row 7.
// Each mechanism is counted, and one that never happens counts as a failure.
// The expected windows for the refresh period follow from the model
// parameters: the weakest replica cell holds 58982 units, gaining 1 per
// cycle with its WBL low and 16 with it high.
module tb_gc_edram_testchip;
  import gc_pkg::*;
  localparam int W = $bits(cfg_t) + $bits(acc_t);
  localparam logic [AW-1:0] VICTIM = 63;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, bist_start = 0, ext_interrupt = 0;
  logic [1:0] mode = 2'(MODE_DIRECT);
  logic scan_in = 0, scan_shift = 0, scan_update = 0, scan_capture = 0, scan_out;
  acc_t ext_acc = '0;
  logic [COLS-1:0] rdata_out;
  logic refresh_needed_out, bist_pass, row_valid, bist_done;
  logic [3:0] dout, ctrl_state;
  logic unload_en = 0, unload_valid, unload_done;

  gc_edram_testchip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- event monitor ----------------
  int n_init_wr = 0, n_disturb = 0, n_pseudo = 0, n_check_ok = 0, n_refresh_needed = 0;
  int n_refresh_rep = 0, n_rows = 0, n_bist_fail = 0, n_done = 0, n_flush = 0;
  int n_scan_acc = 0, n_direct_acc = 0;
  longint cycle = 0, last_refresh = -1, period = 0;
  logic [3:0] prev_state = 0;
  int fail_row = -1;
  logic [3:0] fail_dout;
  always @(negedge clk) begin
    cycle++;
    if (rst_n && mode == 2'(MODE_CTRL)) begin
      if (ctrl_state == 4'(ST_INIT_WRITE)) n_init_wr++;
      if (ctrl_state == 4'(ST_DISTURB)) n_disturb++;
      if (dut.acc.pseudo_write) n_pseudo++;
      if (prev_state == 4'(ST_CHECK) && ctrl_state == 4'(ST_IDLE)) n_check_ok++;
      if (refresh_needed_out) n_refresh_needed++;
      if (ctrl_state == 4'(ST_REFRESH_REP)) begin
        n_refresh_rep++;
        if (last_refresh >= 0) period = cycle - last_refresh;
        last_refresh = cycle;
      end
      if (row_valid) begin
        n_rows++;
        if (!bist_pass) begin n_bist_fail++; fail_row = int'(dut.u_ctrl.row); fail_dout = dout; end
      end
    end
    if (rst_n && mode == 2'(MODE_SCAN) && dut.scan_acc.wen | dut.scan_acc.ren) n_scan_acc++;
    if (rst_n && mode == 2'(MODE_DIRECT) && (ext_acc.wen | ext_acc.ren)) n_direct_acc++;
    prev_state = ctrl_state;
  end

  // ---------------- helpers ----------------
  cfg_t cfg;
  task automatic scan_load(input cfg_t c, input acc_t a);
    logic [W-1:0] v = {c, a};
    for (int i = W - 1; i >= 0; i--) begin
      scan_in = v[i]; scan_shift = 1; @(negedge clk);
    end
    scan_shift = 0;
    scan_update = 1; @(negedge clk); scan_update = 0;
  endtask

  task automatic wait_refreshes(input int n, output longint per);
    int target = n_refresh_rep + n;
    while (n_refresh_rep < target) @(negedge clk);
    per = period;
  endtask

  task automatic direct(input acc_t a);
    ext_acc = a; @(negedge clk); ext_acc = '0;
  endtask

  acc_t a;
  logic [W-1:0] got;
  longint t10, tps, t100;
  int base_fail;
  logic [COLS-1:0] flushed [ROWS];

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. direct access
    for (int r = 0; r < 4; r++) begin
      a = '0; a.wen = 1; a.waddr = AW'(r); a.wdata = 32'h1111_1111 * (r + 1); direct(a);
    end
    for (int r = 0; r < 4; r++) begin
      a = '0; a.ren = 1; a.raddr = AW'(r); direct(a);
      ck(rdata_out == 32'h1111_1111 * (r + 1), "direct-mode read back");
    end

    // 2. scan-configured access
    mode = 2'(MODE_SCAN);
    a = '0; a.wen = 1; a.waddr = 5; a.wdata = 32'hCAFE_F00D;
    scan_load(cfg, a);
    @(negedge clk);
    a = '0; a.ren = 1; a.raddr = 5;
    scan_load(cfg, a);
    @(negedge clk);
    ck(rdata_out == 32'hCAFE_F00D, "scan-mode write and read");
    scan_capture = 1; @(negedge clk); scan_capture = 0;
    for (int i = W - 1; i >= 0; i--) begin
      got[i] = scan_out; scan_in = 0; scan_shift = 1; @(negedge clk);
    end
    scan_shift = 0;
    a.wdata = 32'hCAFE_F00D;
    ck(got == {cfg, a}, "scan-mode read word shifted out");

    // 3. controller, 10 % write activity
    cfg.idle_period = 128; cfg.disturb_period = 10; cfg.pseudo_period = 0;
    cfg.victim_addr = VICTIM; cfg.pattern = '0;
    scan_load(cfg, '0);
    mode = 2'(MODE_CTRL);
    bist_start = 1; @(negedge clk); bist_start = 0;
    wait_refreshes(4, t10);
    $display("refresh period at 10%% write activity: %0d cycles", t10);
    ck(t10 > 20000 && t10 < 30000, "period at 10% activity within the expected window");
    ck(n_bist_fail == 0, "no data lost at 10% activity");

    // 4. calibration by pseudo-writes
    cfg.pseudo_period = 20;
    scan_load(cfg, '0);
    wait_refreshes(3, tps);
    $display("refresh period with pseudo-writes: %0d cycles", tps);
    ck(tps < t10 * 9 / 10 && tps > 15000, "pseudo-writes shorten the period");

    // 5. 100 % write activity
    cfg.pseudo_period = 0; cfg.disturb_period = 1;
    scan_load(cfg, '0);
    wait_refreshes(3, t100);
    $display("refresh period at 100%% write activity: %0d cycles (ratio %0d.%0d)",
             t100, t10 / t100, (t10 * 10 / t100) % 10);
    ck(t100 > 3000 && t100 < 5500, "period at 100% activity within the expected window");
    ck(t10 > 5 * t100, "more than 5x longer period at 10% activity");
    ck(n_bist_fail == 0, "no data lost at 100% activity");

    // 6. a wrong word in row 7 is found by the next refresh
    cfg.disturb_period = 10;
    scan_load(cfg, '0);
    while (ctrl_state != 4'(ST_IDLE)) @(negedge clk);
    mode = 2'(MODE_DIRECT);
    a = '0; a.wen = 1; a.waddr = 7; a.wdata = 32'h9000_0001; direct(a);
    mode = 2'(MODE_CTRL);
    base_fail = n_bist_fail;
    wait_refreshes(1, t10);
    while (ctrl_state != 4'(ST_IDLE)) @(negedge clk);
    ck(n_bist_fail == base_fail + 1 && fail_row == 7, "refresh reports the wrong row on BIST_PASS");
    ck(fail_dout == 4'h9, "DOUT shows the four MSBs of the failing row");

    // 7. interrupt, Done and flush
    ext_interrupt = 1; @(negedge clk); ext_interrupt = 0;
    while (!bist_done) @(negedge clk);
    n_done++;
    for (int k = 0; k < 5000 && !unload_done; k++) begin
      unload_en = 1;
      #1;
      if (unload_valid) begin
        flushed[n_flush / 8][31 - 4 * (n_flush % 8) -: 4] = dout;
        n_flush++;
      end
      @(negedge clk);
    end
    unload_en = 0;
    ck(n_flush == ROWS * COLS / 4, "512 nibbles flushed");
    for (int r = 0; r < ROWS; r++)
      ck(flushed[r] == ((r == 7) ? 32'h9000_0001 : 32'h0), $sformatf("flushed result row %0d", r));

    $display("events: init_wr=%0d disturb=%0d pseudo=%0d check_ok=%0d refresh_needed=%0d refresh_replica=%0d rows=%0d bist_fail=%0d done=%0d flush=%0d scan_acc=%0d direct_acc=%0d",
             n_init_wr, n_disturb, n_pseudo, n_check_ok, n_refresh_needed, n_refresh_rep,
             n_rows, n_bist_fail, n_done, n_flush, n_scan_acc, n_direct_acc);
    ck(n_init_wr == ROWS, "initial write of every row");
    ck(n_disturb > 0, "Disturb happened");
    ck(n_pseudo > 0, "pseudo-write happened");
    ck(n_check_ok > 0, "CheckReplica without refresh happened");
    ck(n_refresh_needed > 0, "RefreshNeeded happened");
    ck(n_refresh_rep > 0, "RefreshReplica happened");
    ck(n_rows > 0 && n_rows % ROWS == 0, "whole-array refreshes happened");
    ck(n_bist_fail > 0, "a BIST failure was reported");
    ck(n_done > 0 && n_flush > 0, "Done and flush happened");
    ck(n_scan_acc >= 2, "scan-mode accesses happened");
    ck(n_direct_acc > 0, "direct accesses happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
