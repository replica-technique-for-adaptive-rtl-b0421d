// cmp_sram: the 2 kb on-chip SRAM that keeps the per-bit comparison results.
//
// One row of results per array row (64 x 32 bits), single port. A write
// stores wdata at addr at the clock edge; a read returns the word at addr
// one cycle after re. Written as an array, so synthesis maps it to a memory.
// The organisation matches the array; the single port and the one-cycle
// read latency are this design's choice.
module cmp_sram
  import gc_pkg::*;
#(
  parameter int unsigned DEPTH = ROWS,
  parameter int unsigned WIDTH = COLS
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
