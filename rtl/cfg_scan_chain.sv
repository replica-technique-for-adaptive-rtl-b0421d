// cfg_scan_chain: the configuration scan chain of the test chip.
//
// A serial shift register holds the controller configuration (cfg_t) and one
// array access word (acc_t), packed as {cfg, acc}, and is shifted in MSB
// first, one bit per cycle with shift high; scan_out is the bit leaving the
// chain. A pulse on update copies the chain into the configuration
// registers and the access word; in the cycle after update, scan_acc
// carries that access word for exactly one cycle and is idle otherwise. This
// is how the array is operated through the scan chain. capture loads rdata
// into the wdata field of the chain, so a word read in scan mode can be
// shifted out on scan_out. The chain's layout, the one-shot access word and
// the capture path are this design's own choices; the chip only names scan
// chain configuration as one of its test modes. Configuration and chain
// reset to zero.
module cfg_scan_chain
  import gc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            scan_in,
  input  logic            shift,
  input  logic            update,
  input  logic            capture,
  input  logic [COLS-1:0] rdata,
  output logic            scan_out,
  output cfg_t            cfg,
  output acc_t            scan_acc
);

  localparam int unsigned CW = $bits(cfg_t);
  localparam int unsigned XW = $bits(acc_t);
  localparam int unsigned W  = CW + XW;
  // position of the wdata field inside the packed access word
  // (below it: ren, raddr, pseudo_write, refresh_replica, check_replica, rep_addr)
  localparam int unsigned WD_LSB = 1 + AW + 1 + 1 + 1 + RAW;

  logic [W-1:0] chain;
  acc_t         acc_q;
  logic         go_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain <= '0;
      cfg   <= '0;
      acc_q <= ACC_IDLE;
      go_q  <= 1'b0;
    end else begin
      go_q <= update;
      if (update) begin
        cfg   <= cfg_t'(chain[W-1 -: CW]);
        acc_q <= acc_t'(chain[XW-1:0]);
      end
      if (shift)        chain <= {chain[W-2:0], scan_in};
      else if (capture) chain[WD_LSB +: COLS] <= rdata;
    end
  end

  // the access word reaches the array for one cycle per update only
  a_one_shot: assert property (@(posedge clk) disable iff (!rst_n)
    go_q |=> !go_q || $past(update));

  assign scan_out = chain[W-1];
  assign scan_acc = go_q ? acc_q : ACC_IDLE;

endmodule
