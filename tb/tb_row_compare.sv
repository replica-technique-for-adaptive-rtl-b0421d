// tb_row_compare: random rows against random patterns, with and without the
// victim flag. The expected per-bit result, pass bit and MSB nibble are
// computed bit by bit in the testbench.
module tb_row_compare;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  logic [COLS-1:0] rdata, pattern, mismatch, exp_mm;
  logic is_victim, pass, exp_pass;
  logic [3:0] msb;

  row_compare dut (.rdata, .pattern, .is_victim, .mismatch, .pass, .msb);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      pattern = $urandom;
      rdata = (i % 3 == 0) ? pattern : (pattern ^ (32'h1 << ($urandom % 32)));
      if (i % 7 == 0) rdata = $urandom;
      is_victim = (i % 5 == 0);
      #1;
      exp_pass = 1'b1;
      for (int b = 0; b < COLS; b++) begin
        exp_mm[b] = !is_victim && (rdata[b] != pattern[b]);
        if (exp_mm[b]) exp_pass = 1'b0;
      end
      checks++; if (mismatch !== exp_mm) begin failures++; $display("mismatch word wrong"); end
      checks++; if (pass !== exp_pass) begin failures++; $display("pass wrong"); end
      checks++; if (msb !== {rdata[31], rdata[30], rdata[29], rdata[28]}) begin failures++; $display("msb wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
