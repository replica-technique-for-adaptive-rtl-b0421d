// test_controller: the on-chip test controller that runs the replica-timed
// refresh loop of the gain-cell array.
//
// After start the controller writes every row once (the configured pattern,
// all ones in the Disturb victim row), writes '0' into all replica cells and
// enters the idle phase. The idle phase consists of the Idle and Disturb
// states:
//   * every disturb_period cycles it spends one cycle in Disturb, writing all
//     ones to the victim row. That raises every write bitline and stresses
//     every stored '0'. A period of 1 writes in every cycle (100 % write
//     activity); 0 turns Disturb off;
//   * every pseudo_period cycles it raises the replica bitline for one cycle
//     without writing (pseudo-write). This calibrates the replica to fail
//     somewhat earlier than the write statistics alone would make it;
//   * after idle_period cycles it enters CheckReplica.
// CheckReplica reads the 32 replica cells one per cycle; each result comes
// back the next cycle. When a replica cell reads '1' (RefreshNeeded), the
// controller rewrites the replica column with '0' (RefreshReplica) and then
// refreshes the array row by row. Each row takes a Read cycle and a
// write-back cycle. In the write-back cycle the returned data is checked
// against the written data: the per-bit result goes to the comparison SRAM,
// the pass bit to BIST_PASS and the four MSBs to DOUT, with row_valid marking
// the cycle. The data read is written back unchanged, as a refresh does.
// When all 32 replica cells read '0' the controller returns to Idle for
// another idle_period. An external interrupt (ext_interrupt), remembered until taken, ends the loop
// at the next idle-phase cycle; the controller then stays in Done with
// bist_done high.
//
// The state sequence follows the chip's controller. The two-cycle row
// refresh, stopping CheckReplica at the first failing replica cell, writing
// back the read data, and taking the interrupt only in the idle phase are
// this design's choices.
module test_controller
  import gc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            ext_interrupt,
  input  cfg_t            cfg,
  input  logic [COLS-1:0] rdata,
  input  logic            refresh_needed,
  output acc_t            acc,
  output logic            sram_we,
  output logic [AW-1:0]   sram_addr,
  output logic [COLS-1:0] sram_wdata,
  output logic            row_valid,
  output logic            bist_pass,
  output logic [3:0]      dout_row,
  output logic            bist_done,
  output state_e          state
);

  state_e        st, st_n;
  logic [AW-1:0] row;
  logic [RAW:0]  rep;
  logic [TW-1:0] idle_cnt, dist_cnt, pseudo_cnt;
  logic          irq_q;

  logic idle_phase, idle_hit, dist_hit, pseudo_hit;
  logic [COLS-1:0] mismatch;
  logic            pass;
  logic [3:0]      msb;

  row_compare u_cmp (
    .rdata    (rdata),
    .pattern  (cfg.pattern),
    .is_victim(row == cfg.victim_addr),
    .mismatch (mismatch),
    .pass     (pass),
    .msb      (msb)
  );

  always_comb begin
    idle_phase = (st == ST_IDLE) || (st == ST_DISTURB);
    idle_hit   = (cfg.idle_period <= TW'(1)) || (idle_cnt == cfg.idle_period - TW'(1));
    dist_hit   = (cfg.disturb_period != '0) && (dist_cnt >= cfg.disturb_period - TW'(1));
    pseudo_hit = (cfg.pseudo_period != '0) && (pseudo_cnt >= cfg.pseudo_period - TW'(1));
  end

  // next state
  always_comb begin
    st_n = st;
    unique case (st)
      ST_RESET:       if (start) st_n = ST_INIT_WRITE;
      ST_INIT_WRITE:  if (row == AW'(ROWS - 1)) st_n = ST_INIT_REPL;
      ST_INIT_REPL:   st_n = ST_IDLE;
      ST_IDLE, ST_DISTURB:
        if (irq_q)         st_n = ST_DONE;
        else if (idle_hit) st_n = ST_CHECK;
        else if (dist_hit) st_n = ST_DISTURB;
        else               st_n = ST_IDLE;
      ST_CHECK:
        if (refresh_needed)            st_n = ST_REFRESH_REP;
        else if (rep == (RAW + 1)'(REPLICAS)) st_n = ST_IDLE;
      ST_REFRESH_REP: st_n = ST_READ;
      ST_READ:        st_n = ST_WRITE_BACK;
      ST_WRITE_BACK:  st_n = (row == AW'(ROWS - 1)) ? ST_IDLE : ST_READ;
      ST_DONE:        st_n = ST_DONE;
      default:        st_n = ST_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= ST_RESET;
      row        <= '0;
      rep        <= '0;
      idle_cnt   <= '0;
      dist_cnt   <= '0;
      pseudo_cnt <= '0;
      irq_q      <= 1'b0;
    end else begin
      st    <= st_n;
      irq_q <= irq_q | ext_interrupt;
      if (idle_phase) begin
        idle_cnt   <= idle_hit   ? '0 : idle_cnt + 1'b1;
        dist_cnt   <= dist_hit   ? '0 : dist_cnt + 1'b1;
        pseudo_cnt <= pseudo_hit ? '0 : pseudo_cnt + 1'b1;
      end
      unique case (st)
        ST_RESET:       row <= '0;
        ST_INIT_WRITE:  row <= row + 1'b1;
        ST_IDLE, ST_DISTURB: rep <= '0;
        ST_CHECK:       rep <= rep + 1'b1;
        ST_REFRESH_REP: row <= '0;
        ST_WRITE_BACK:  row <= row + 1'b1;
        default: ;
      endcase
    end
  end

  // array, replica and SRAM control
  always_comb begin
    acc        = ACC_IDLE;
    sram_we    = 1'b0;
    sram_addr  = row;
    sram_wdata = mismatch;
    row_valid  = 1'b0;
    bist_pass  = 1'b0;
    dout_row   = 4'h0;
    unique case (st)
      ST_INIT_WRITE: begin
        acc.wen   = 1'b1;
        acc.waddr = row;
        acc.wdata = (row == cfg.victim_addr) ? '1 : cfg.pattern;
      end
      ST_INIT_REPL, ST_REFRESH_REP: acc.refresh_replica = 1'b1;
      ST_DISTURB: begin
        acc.wen   = 1'b1;
        acc.waddr = cfg.victim_addr;
        acc.wdata = '1;
      end
      ST_CHECK: begin
        acc.check_replica = (rep < (RAW + 1)'(REPLICAS)) && !refresh_needed;
        acc.rep_addr      = rep[RAW-1:0];
      end
      ST_READ: begin
        acc.ren   = 1'b1;
        acc.raddr = row;
      end
      ST_WRITE_BACK: begin
        acc.wen   = 1'b1;
        acc.waddr = row;
        acc.wdata = rdata;
        sram_we   = 1'b1;
        row_valid = 1'b1;
        bist_pass = pass;
        dout_row  = msb;
      end
      default: ;
    endcase
    acc.pseudo_write = idle_phase && pseudo_hit;
  end

  // Protocol rules: a refresh row is always a Read followed by its
  // write-back, the replica is never reset and checked in the same cycle, and
  // nothing touches the array once the controller is in Done.
  a_read_then_wb: assert property (@(posedge clk) disable iff (!rst_n)
    st == ST_READ |=> st == ST_WRITE_BACK);
  a_replica_excl: assert property (@(posedge clk) disable iff (!rst_n)
    !(acc.refresh_replica && acc.check_replica));
  a_done_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    st == ST_DONE |-> !(acc.wen || acc.ren || acc.check_replica || acc.pseudo_write));

  assign bist_done = (st == ST_DONE);
  assign state     = st;

endmodule
