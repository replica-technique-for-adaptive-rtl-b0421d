// gc_edram_testchip: 2 kb gain-cell eDRAM macro with replica-timed refresh,
// and the logic of the test chip built around it.
//
// The 64x32 array and the 32-cell replica column share the write enable: the
// replica write bitline is high in every array write cycle, so the replica
// cells see the same write statistics as the data. They hold a little less
// charge, so they lose their '0' before any array cell does. Reading a '1'
// from the replica column (refresh_needed) is what starts an array refresh,
// so the refresh period follows the die's actual retention and the actual
// write activity instead of a worst-case figure.
//
// Around the macro:
//   * test_controller runs the refresh loop at speed (Idle, Disturb,
//     CheckReplica, RefreshReplica, Read/write-back, Done). Each refreshed
//     row is checked: per-bit results go to cmp_sram, and bist_pass, dout and
//     row_valid show the row on the pads;
//   * cfg_scan_chain holds the controller configuration and a single access
//     word for scan-mode operation;
//   * access_mux selects the array driver by mode: 0 controller, 1 scan
//     chain, 2 the ext_acc pins;
//   * wbl_driver pulls the data write bitlines low outside writes and drives
//     the replica bitline from the write enable or a pseudo-write;
//   * result_unloader shifts cmp_sram out on dout, four bits per unload_en
//     cycle, once bist_done is high.
// gc_array and replica_column are behavioural models of the full-custom
// cells. Their parameters set the modelled retention in clock cycles.
// dout carries the row MSBs while the loop runs and the SRAM flush after
// bist_done. rdata_out shows the array read port, for scan and direct modes.
module gc_edram_testchip
  import gc_pkg::*;
#(
  parameter int unsigned ARRAY_DRT_MIN   = 65536,
  parameter int unsigned REPLICA_DRT_MIN = 58982,
  parameter int unsigned LEAK_LOW        = 1,
  parameter int unsigned LEAK_HIGH       = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      mode,
  input  logic            bist_start,
  input  logic            ext_interrupt,
  // configuration scan chain
  input  logic            scan_in,
  input  logic            scan_shift,
  input  logic            scan_update,
  input  logic            scan_capture,
  output logic            scan_out,
  // direct external access
  input  acc_t            ext_acc,
  output logic [COLS-1:0] rdata_out,
  output logic            refresh_needed_out,
  // BIST pads
  output logic            bist_pass,
  output logic            row_valid,
  output logic [3:0]      dout,
  output logic            bist_done,
  // result flush
  input  logic            unload_en,
  output logic            unload_valid,
  output logic            unload_done,
  output logic [3:0]      ctrl_state
);

  cfg_t   cfg;
  acc_t   ctrl_acc, scan_acc, acc;
  state_e state;

  logic [COLS-1:0] rdata, wbl;
  logic            wbl_rep, refresh_needed;

  logic            ctl_sram_we;
  logic [AW-1:0]   ctl_sram_addr, unl_sram_addr;
  logic [COLS-1:0] ctl_sram_wdata, sram_rdata;
  logic            unl_sram_re;
  logic [3:0]      dout_row, dout_unl;

  cfg_scan_chain u_scan (
    .clk, .rst_n,
    .scan_in, .shift(scan_shift), .update(scan_update), .capture(scan_capture),
    .rdata, .scan_out, .cfg, .scan_acc
  );

  test_controller u_ctrl (
    .clk, .rst_n,
    .start        (bist_start && mode == 2'(MODE_CTRL)),
    .ext_interrupt,
    .cfg, .rdata, .refresh_needed,
    .acc          (ctrl_acc),
    .sram_we      (ctl_sram_we),
    .sram_addr    (ctl_sram_addr),
    .sram_wdata   (ctl_sram_wdata),
    .row_valid, .bist_pass,
    .dout_row, .bist_done, .state
  );

  access_mux u_mux (
    .mode(mode_e'(mode)), .ctrl_acc, .scan_acc, .ext_acc, .acc
  );

  wbl_driver u_wbl (
    .wen(acc.wen), .wdata(acc.wdata), .pseudo_write(acc.pseudo_write),
    .wbl, .wbl_rep
  );

  gc_array #(
    .DRT_MIN(ARRAY_DRT_MIN), .LEAK_LOW(LEAK_LOW), .LEAK_HIGH(LEAK_HIGH)
  ) u_array (
    .clk, .wen(acc.wen), .waddr(acc.waddr), .wbl,
    .ren(acc.ren), .raddr(acc.raddr), .rdata
  );

  replica_column #(
    .DRT_MIN(REPLICA_DRT_MIN), .LEAK_LOW(LEAK_LOW), .LEAK_HIGH(LEAK_HIGH)
  ) u_replica (
    .clk, .refresh_replica(acc.refresh_replica), .wbl_rep,
    .check_replica(acc.check_replica), .rep_addr(acc.rep_addr), .refresh_needed
  );

  cmp_sram u_sram (
    .clk,
    .we   (ctl_sram_we && !bist_done),
    .re   (unl_sram_re),
    .addr (bist_done ? unl_sram_addr : ctl_sram_addr),
    .wdata(ctl_sram_wdata),
    .rdata(sram_rdata)
  );

  result_unloader u_unl (
    .clk, .rst_n, .start(bist_done), .scan_en(unload_en),
    .sram_re(unl_sram_re), .sram_addr(unl_sram_addr), .sram_rdata,
    .dout(dout_unl), .valid(unload_valid), .done(unload_done)
  );

  assign dout               = bist_done ? dout_unl : dout_row;
  assign rdata_out          = rdata;
  assign refresh_needed_out = refresh_needed;
  assign ctrl_state         = state;

endmodule
