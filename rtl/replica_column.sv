// replica_column: behavioural model of the replica column and its readout.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// column of 32 standard all-PMOS 2T cells laid out like the array cells but
// with one metal layer less above them, so their storage capacitance is
// smaller and they lose a '0' sooner than the array does.
//   * refresh_replica writes '0' to all 32 replica cells in one cycle,
//     independent of the rest of the array.
//   * The replica write bitline (wbl_rep) is high in every array write cycle
//     and during pseudo-write cycles; otherwise it is low. A stored '0'
//     degrades LEAK_HIGH units per cycle with wbl_rep high and LEAK_LOW units
//     with it low, as in the array model.
//   * check_replica reads the cell at rep_addr. A cell whose degradation has
//     reached its threshold reads '1', and that '1' is returned on
//     refresh_needed in the next cycle. refresh_needed is 0 in cycles after
//     no check.
// All replica cells are written together, so one stress counter and one
// snapshot taken at the last RefreshReplica give the degradation of every
// cell (modulo 2^32).
// Thresholds are DRT_MIN plus a hashed local variation of up to
// DRT_MIN*SPREAD_PCT/100. The default DRT_MIN is 90 % of the array model's,
// standing for the reduced storage capacitance; that ratio is this model's
// own choice.
module replica_column
  import gc_pkg::*;
#(
  parameter int unsigned DRT_MIN    = 58982,
  parameter int unsigned SPREAD_PCT = 10,
  parameter int unsigned LEAK_LOW   = 1,
  parameter int unsigned LEAK_HIGH  = 16
) (
  input  logic           clk,
  input  logic           refresh_replica,
  input  logic           wbl_rep,
  input  logic           check_replica,
  input  logic [RAW-1:0] rep_addr,
  output logic           refresh_needed
);

  logic [31:0] stress;  // cumulative stress of the replica column
  logic [31:0] snap;    // stress at the last RefreshReplica

  // threshold of replica cell i; the cell in the middle is the weakest
  function automatic logic [31:0] cell_thr(logic [RAW-1:0] i);
    logic [31:0] h;
    if (i == RAW'(REPLICAS / 2)) return DRT_MIN;
    h = {24'h27d4eb, 3'b0, i} ^ 32'h85eb_ca6b;
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return DRT_MIN + (h % (DRT_MIN * SPREAD_PCT / 100 + 1));
  endfunction

  initial begin
    stress         = '0;
    snap           = '0;
    refresh_needed = 1'b0;
  end

  always @(posedge clk) begin
    stress         <= stress + (wbl_rep ? LEAK_HIGH : LEAK_LOW);
    if (refresh_replica) snap <= stress;
    refresh_needed <= check_replica && ((stress - snap) >= cell_thr(rep_addr));
  end

endmodule
