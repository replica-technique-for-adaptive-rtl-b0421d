// wbl_driver: write bitline drive for the data columns and the replica column.
//
// The data write bitlines carry the write data only in a write cycle; in
// every read or standby cycle they are pulled low, which strengthens stored
// '0's and barely affects stored '1's. The replica column's write bitline is
// tied to the write enable, so it is high in every array write cycle whatever
// data is written. That exposes the replica cells to the worst case only as
// often as the array is actually written. A pseudo-write raises the replica
// bitline without any array write; the controller uses it for per-die
// calibration. All of this follows the replica scheme; the module is
// combinational and has no timing of its own.
module wbl_driver
  import gc_pkg::*;
(
  input  logic            wen,
  input  logic [COLS-1:0] wdata,
  input  logic            pseudo_write,
  output logic [COLS-1:0] wbl,
  output logic            wbl_rep
);

  always_comb begin
    wbl     = wen ? wdata : '0;
    wbl_rep = wen | pseudo_write;
  end

endmodule
