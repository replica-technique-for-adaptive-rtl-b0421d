// access_mux: chooses who drives the gain-cell array.
//
// The test chip has three ways to operate the array: the on-chip test
// controller at speed, single accesses set up through the configuration scan
// chain, and external pins that drive the array directly. mode selects one
// of them; an unused mode encoding leaves the array idle. Combinational.
// The three modes follow the chip; the encoding is this design's.
module access_mux
  import gc_pkg::*;
(
  input  mode_e mode,
  input  acc_t  ctrl_acc,
  input  acc_t  scan_acc,
  input  acc_t  ext_acc,
  output acc_t  acc
);

  always_comb begin
    unique case (mode)
      MODE_CTRL:   acc = ctrl_acc;
      MODE_SCAN:   acc = scan_acc;
      MODE_DIRECT: acc = ext_acc;
      default:     acc = ACC_IDLE;
    endcase
  end

endmodule
