// gc_array: behavioural model of the 64x32 all-PMOS 2T gain-cell array.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// full-custom array of 2T cells (PMOS write transistor MW, PMOS read
// transistor MR, parasitic storage node SN). What the model keeps is the
// cell's retention behaviour as the test chip sees it:
//   * a write copies the level on each write bitline (WBL) into the cells of
//     the addressed row;
//   * a stored '0' degrades a little every cycle. It degrades LEAK_LOW units
//     per cycle while its column's WBL is low, and LEAK_HIGH units per cycle
//     while it is high. High WBL happens only when a '1' is written to another
//     cell of the same column;
//   * a '0' whose accumulated degradation reaches the cell's retention
//     threshold reads out as '1'. Thresholds are DRT_MIN plus a fixed
//     per-cell local variation of up to DRT_MIN*SPREAD_PCT/100, taken from a
//     hash of the cell position;
//   * a stored '1' is taken not to fail. Its retention is far longer than
//     that of a '0' in an all-PMOS cell, so it is out of the modelled window.
// Degradation is kept per column, not per cell: each column has a
// cumulative stress counter that grows by LEAK_LOW or LEAK_HIGH every cycle,
// and each write stores a snapshot of the counters for the written row. A
// '0' cell's degradation is the counter minus its snapshot, taken modulo
// 2^32, so the model holds while a cell has been left unwritten for fewer
// than 2^32 units. The degradation units and thresholds are this model's own
// choice. The
// LEAK_HIGH/LEAK_LOW ratio of 16 is chosen so that the retention at 10 %
// write activity is more than five times that at 100 %.
//
// Interface: a write port (wen, waddr, wbl) and a read port (ren, raddr,
// rdata) that may be used in the same cycle. Writes take effect at the
// clock edge; read data is registered and valid the cycle after ren.
module gc_array
  import gc_pkg::*;
#(
  parameter int unsigned DRT_MIN    = 65536, // degradation units the weakest cell holds
  parameter int unsigned SPREAD_PCT = 25,    // local variation of the thresholds
  parameter int unsigned LEAK_LOW   = 1,     // units per cycle with WBL low
  parameter int unsigned LEAK_HIGH  = 16     // units per cycle with WBL high
) (
  input  logic            clk,
  input  logic            wen,
  input  logic [AW-1:0]   waddr,
  input  logic [COLS-1:0] wbl,     // write bitline levels from the WBL drivers
  input  logic            ren,
  input  logic [AW-1:0]   raddr,
  output logic [COLS-1:0] rdata
);

  typedef logic [COLS-1:0][31:0] stress_row_t;

  logic [COLS-1:0] sn   [ROWS];  // level written to each storage node
  stress_row_t     snap [ROWS];  // column stress at the last write of each cell
  stress_row_t     stress;       // cumulative stress per column

  // retention threshold of cell (r, c): DRT_MIN plus a hashed local variation
  function automatic logic [31:0] cell_thr(logic [AW-1:0] r, logic [7:0] c);
    logic [31:0] h;
    h = {16'h9e37, 2'b0, c, r} ^ 32'h5bd1_e995;
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return DRT_MIN + (h % (DRT_MIN * SPREAD_PCT / 100 + 1));
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      sn[r]   = '0;
      snap[r] = '0;
    end
    stress = '0;
    rdata  = '0;
  end

  always @(posedge clk) begin
    for (int c = 0; c < COLS; c++)
      stress[c] <= stress[c] + (wbl[c] ? LEAK_HIGH : LEAK_LOW);
    if (wen) begin
      sn[waddr]   <= wbl;
      snap[waddr] <= stress;
    end
    if (ren) begin
      for (int c = 0; c < COLS; c++)
        rdata[c] <= sn[raddr][c] | ((stress[c] - snap[raddr][c]) >= cell_thr(raddr, 8'(c)));
    end
  end

endmodule
