// tb_cmp_sram: fills the 64x32 result SRAM with random words, overwrites
// some, and reads every row back, checking the data and the one-cycle read
// latency against a reference array kept in the testbench.
module tb_cmp_sram;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] addr = '0;
  logic [COLS-1:0] wdata = '0, rdata;
  logic [COLS-1:0] ref_mem [ROWS];

  cmp_sram dut (.clk, .we, .re, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      we = 1; addr = AW'(r); wdata = $urandom; ref_mem[r] = wdata;
      @(negedge clk);
    end
    for (int k = 0; k < 40; k++) begin
      int r = $urandom % ROWS;
      we = 1; addr = AW'(r); wdata = $urandom; ref_mem[r] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      re = 1; addr = AW'(r);
      @(negedge clk);
      re = 0; addr = AW'(r + 1);
      checks++;
      if (rdata !== ref_mem[r]) begin failures++; $display("row %0d read %h exp %h", r, rdata, ref_mem[r]); end
      @(negedge clk);
      checks++;  // data holds while re is low
      if (rdata !== ref_mem[r]) begin failures++; $display("row %0d not held", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
