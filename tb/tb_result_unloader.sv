// tb_result_unloader: an SRAM model in the testbench holds random rows. After
// start, scan_en is pulsed irregularly; every nibble shown with valid and
// scan_en high is collected. The testbench checks the order (row 0 first,
// bits 31:28 first), the count (512 nibbles), that done rises after the last
// one, and that nothing moves before start.
module tb_result_unloader;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, scan_en = 0;
  logic sram_re, valid, done;
  logic [AW-1:0] sram_addr;
  logic [COLS-1:0] sram_rdata = '0;
  logic [3:0] dout;
  logic [COLS-1:0] mem [ROWS];

  result_unloader dut (.clk, .rst_n, .start, .scan_en, .sram_re, .sram_addr,
                       .sram_rdata, .dout, .valid, .done);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (sram_re) sram_rdata <= mem[sram_addr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0, cycles = 0;
  logic [3:0] exp_nib;
  initial begin
    for (int r = 0; r < ROWS; r++) mem[r] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) begin
      scan_en = 1; @(negedge clk);
      checks++; if (valid || done) begin failures++; $display("active before start"); end
    end
    start = 1;
    while (!done && cycles < 5000) begin
      scan_en = ($urandom % 4) != 0;
      #1;
      if (valid && scan_en) begin
        exp_nib = mem[n / 8][31 - 4 * (n % 8) -: 4];
        checks++;
        if (dout !== exp_nib) begin failures++; $display("nibble %0d got %h exp %h", n, dout, exp_nib); end
        n++;
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (n != ROWS * COLS / 4) begin failures++; $display("%0d nibbles flushed, expected %0d", n, ROWS * COLS / 4); end
    checks++;
    if (!done) begin failures++; $display("done never rose"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
