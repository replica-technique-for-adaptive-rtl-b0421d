// row_compare: checks one row read back from the array during a refresh.
//
// The row is compared bit by bit with the data originally written. The
// result word has a '1' for each failing bit and goes to the comparison
// SRAM; pass is the one-bit summary that leaves the chip as BIST_PASS; msb
// carries the four most significant read bits to the DOUT[3:0] pads. The
// Disturb victim row always holds all ones and is not checked: its result
// word is zero and it always passes. The expected word is all ones for the
// victim row and the configured pattern for every other row, which is this
// design's choice of initial data. Combinational; msb is wired straight
// from the read data.
module row_compare
  import gc_pkg::*;
(
  input  logic [COLS-1:0] rdata,
  input  logic [COLS-1:0] pattern,
  input  logic            is_victim,
  output logic [COLS-1:0] mismatch,
  output logic            pass,
  output logic [3:0]      msb
);

  always_comb begin
    mismatch = is_victim ? '0 : (rdata ^ pattern);
    pass     = (mismatch == '0);
    msb      = rdata[COLS-1 -: 4];
  end

endmodule
