// result_unloader: flushes the comparison SRAM to the DOUT[3:0] pads.
//
// Once the controller has reached its termination state (start high), the
// unloader reads the SRAM row by row, from row 0 upwards, into a 32-bit
// register that works as four parallel scan chains of eight bits each, and
// shifts it out four bits at a time. dout shows the current nibble (bits
// 31:28 of the row first, bits 3:0 last) while valid is high; each cycle with
// scan_en high moves on to the next nibble. Reloading a row takes two cycles
// with valid low (SRAM read, then load). done rises after the last nibble of
// the last row. A full flush therefore takes ROWS*COLS/4 = 512 scan_en cycles.
// Flushing over DOUT[3:0] through scan chains follows the chip; the order,
// the handshake and the two-cycle reload are this design's choices.
module result_unloader
  import gc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            scan_en,
  output logic            sram_re,
  output logic [AW-1:0]   sram_addr,
  input  logic [COLS-1:0] sram_rdata,
  output logic [3:0]      dout,
  output logic            valid,
  output logic            done
);

  localparam int unsigned NIBBLES = COLS / 4;

  typedef enum logic [2:0] {U_IDLE, U_REQ, U_LOAD, U_SHIFT, U_FIN} ustate_e;

  ustate_e                      st;
  logic [AW-1:0]                row;
  logic [$clog2(NIBBLES)-1:0]   nib;
  logic [COLS-1:0]              sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= U_IDLE;
      row  <= '0;
      nib  <= '0;
      sreg <= '0;
    end else begin
      unique case (st)
        U_IDLE:  if (start) begin row <= '0; st <= U_REQ; end
        U_REQ:   st <= U_LOAD;
        U_LOAD:  begin sreg <= sram_rdata; nib <= '0; st <= U_SHIFT; end
        U_SHIFT: if (scan_en) begin
                   sreg <= sreg << 4;
                   nib  <= nib + 1'b1;
                   if (nib == $bits(nib)'(NIBBLES - 1)) begin
                     if (row == AW'(ROWS - 1)) st <= U_FIN;
                     else begin row <= row + 1'b1; st <= U_REQ; end
                   end
                 end
        U_FIN:   ;
        default: st <= U_IDLE;
      endcase
    end
  end

  // a row is loaded only right after its SRAM read
  a_load_after_read: assert property (@(posedge clk) disable iff (!rst_n)
    st == U_LOAD |-> $past(st) == U_REQ);

  assign sram_re   = (st == U_REQ);
  assign sram_addr = row;
  assign dout      = sreg[COLS-1 -: 4];
  assign valid     = (st == U_SHIFT);
  assign done      = (st == U_FIN);

endmodule
