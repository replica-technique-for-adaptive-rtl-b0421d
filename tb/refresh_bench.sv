// refresh_bench: one test chip and the procedure that measures its refresh
// timing against its real retention, for a list of write activities.
//
// For each Disturb period DP (write activity 1/DP) the bench
//   * runs the controller with Idle 128 cycles, pattern all zeros and victim
//     row 63, and measures the cycles between the second and third
//     RefreshReplica: the automatic refresh period. No refresh may report a
//     lost bit;
//   * then measures the array's own minimum retention under the same access
//     statistics in direct mode. It writes all zeros and repeats frames of
//     128 cycles with an all-ones victim write every DP cycles, followed by
//     33 write-free cycles (the controller's CheckReplica). Rows are read
//     back in every non-write cycle until the first one fails.
// The automatic period must lie below the measured retention and above 70 %
// of it, must grow with lower write activity, and at DP 10 must be more than
// five times the period at DP 1. SCALE multiplies both the array's and the
// replica's retention, standing for a global (supply or process) shift that
// the replica column has to follow.
module refresh_bench #(
  parameter int unsigned SCALE_NUM = 1,
  parameter int unsigned SCALE_DEN = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import gc_pkg::*;
  localparam int W = $bits(cfg_t) + $bits(acc_t);
  localparam int NDP = 5;
  localparam int DPS [NDP] = '{1, 2, 4, 10, 20};

  logic rst_n = 0, bist_start = 0, ext_interrupt = 0;
  logic [1:0] mode = 2'(MODE_CTRL);
  logic scan_in = 0, scan_shift = 0, scan_update = 0, scan_capture = 0, scan_out;
  acc_t ext_acc = '0;
  logic [COLS-1:0] rdata_out;
  logic refresh_needed_out, bist_pass, row_valid, bist_done;
  logic [3:0] dout, ctrl_state;
  logic unload_en = 0, unload_valid, unload_done;

  gc_edram_testchip #(
    .ARRAY_DRT_MIN  (65536 * SCALE_NUM / SCALE_DEN),
    .REPLICA_DRT_MIN(58982 * SCALE_NUM / SCALE_DEN)
  ) dut (.*);

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL scale %0d/%0d: %s", SCALE_NUM, SCALE_DEN, what); end
  endtask

  int n_rr = 0, n_fail = 0;
  longint cyc = 0, last_rr = -1, per = 0;
  always @(negedge clk) begin
    cyc++;
    if (mode == 2'(MODE_CTRL) && rst_n && ctrl_state == 4'(ST_REFRESH_REP)) begin
      n_rr++;
      if (last_rr >= 0) per = cyc - last_rr;
      last_rr = cyc;
    end
    if (mode == 2'(MODE_CTRL) && rst_n && row_valid && !bist_pass) n_fail++;
  end

  task automatic scan_load(input cfg_t c);
    logic [W-1:0] v = {c, acc_t'('0)};
    for (int i = W - 1; i >= 0; i--) begin
      scan_in = v[i]; scan_shift = 1; @(negedge clk);
    end
    scan_shift = 0;
    scan_update = 1; @(negedge clk); scan_update = 0;
  endtask

  task automatic auto_period(input int dp, output longint p);
    cfg_t c = '0;
    mode = 2'(MODE_CTRL);
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    c.idle_period = 128; c.disturb_period = TW'(dp); c.victim_addr = 63; c.pattern = '0;
    scan_load(c);
    n_rr = 0; n_fail = 0; last_rr = -1;
    bist_start = 1; @(negedge clk); bist_start = 0;
    while (n_rr < 3) @(negedge clk);
    p = per;
    ck(n_fail == 0, $sformatf("data lost under automatic refresh, DP %0d", dp));
  endtask

  task automatic measured_drt(input int dp, output longint d);
    int rr = 0, pending = -1, phase;
    longint k = 0;
    mode = 2'(MODE_DIRECT);
    ext_acc = '0; ext_acc.wen = 1; ext_acc.waddr = 63; ext_acc.wdata = '1; @(negedge clk);
    for (int r = 0; r < 63; r++) begin
      ext_acc = '0; ext_acc.wen = 1; ext_acc.waddr = AW'(r); ext_acc.wdata = '0; @(negedge clk);
    end
    d = -1;
    while (d < 0 && k < 2000000) begin
      phase = int'(k % 161);
      ext_acc = '0;
      if (phase < 128 && (phase % dp) == dp - 1) begin
        ext_acc.wen = 1; ext_acc.waddr = 63; ext_acc.wdata = '1;
      end else begin
        ext_acc.ren = 1; ext_acc.raddr = AW'(rr); rr = (rr + 1) % 63;
      end
      @(negedge clk);
      if (pending >= 0 && rdata_out != '0) d = k;
      pending = ext_acc.ren ? 1 : -1;
      k++;
    end
    ext_acc = '0;
  endtask

  longint ap [NDP];
  longint md [NDP];
  initial begin
    done = 0; checks = 0; failures = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < NDP; i++) begin
      auto_period(DPS[i], ap[i]);
      measured_drt(DPS[i], md[i]);
      $display("scale %0d/%0d  write activity 1/%0d: automatic refresh period %0d cycles, measured minimum retention %0d cycles",
               SCALE_NUM, SCALE_DEN, DPS[i], ap[i], md[i]);
      ck(md[i] > 0, "array retention measured");
      ck(ap[i] < md[i], $sformatf("refresh before the first lost bit, DP %0d", DPS[i]));
      ck(ap[i] * 10 > md[i] * 7, $sformatf("refresh not far ahead of retention, DP %0d", DPS[i]));
      if (i > 0) ck(ap[i] > ap[i-1], "lower write activity gives a longer period");
    end
    ck(ap[3] > 5 * ap[0], "more than 5x longer period at 10% than at 100% activity");
    done = 1;
  end
endmodule
