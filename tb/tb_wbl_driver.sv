// tb_wbl_driver: random stimulus on the write bitline driver. Checks that the
// data bitlines carry the write data only when wen is high and are low
// otherwise, and that the replica bitline is high exactly when wen or
// pseudo_write is.
module tb_wbl_driver;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  logic wen, pseudo_write, wbl_rep;
  logic [COLS-1:0] wdata, wbl;

  wbl_driver dut (.wen, .wdata, .pseudo_write, .wbl, .wbl_rep);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      wen = 1'($urandom); pseudo_write = 1'($urandom); wdata = $urandom;
      if (i < 4) begin wen = i[0]; pseudo_write = i[1]; wdata = '1; end
      #1;
      checks++;
      if (wbl !== (wen ? wdata : 32'h0)) begin
        failures++; $display("wbl mismatch wen=%b wdata=%h wbl=%h", wen, wdata, wbl);
      end
      checks++;
      if (wbl_rep !== (wen || pseudo_write)) begin
        failures++; $display("wbl_rep mismatch wen=%b pw=%b", wen, pseudo_write);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
