// tb_cfg_scan_chain: shifts random {configuration, access word} vectors into
// the chain MSB first and checks, after update, the configuration fields and
// the one-cycle access word. Also checks that scan_out returns the previous
// chain contents bit for bit, and that capture puts read data into the
// wdata field of the chain.
module tb_cfg_scan_chain;
  import gc_pkg::*;
  localparam int W = $bits(cfg_t) + $bits(acc_t);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, scan_in = 0, shift = 0, update = 0, capture = 0;
  logic [COLS-1:0] rdata = '0;
  logic scan_out;
  cfg_t cfg;
  acc_t scan_acc;

  cfg_scan_chain dut (.clk, .rst_n, .scan_in, .shift, .update, .capture, .rdata,
                      .scan_out, .cfg, .scan_acc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] vec, prev, got;
  cfg_t exp_cfg;
  acc_t exp_acc;

  task automatic shift_vec(input logic [W-1:0] v, output logic [W-1:0] out);
    for (int i = W - 1; i >= 0; i--) begin
      scan_in = v[i]; shift = 1;
      out[i] = scan_out;         // bit leaving the chain before this shift
      @(negedge clk);
    end
    shift = 0;
  endtask

  initial begin
    prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 6; t++) begin
      exp_cfg.idle_period    = TW'($urandom);
      exp_cfg.disturb_period = TW'($urandom);
      exp_cfg.pseudo_period  = TW'($urandom);
      exp_cfg.victim_addr    = AW'($urandom);
      exp_cfg.pattern        = $urandom;
      exp_acc.wen = 1'($urandom); exp_acc.waddr = AW'($urandom); exp_acc.wdata = $urandom;
      exp_acc.ren = 1'($urandom); exp_acc.raddr = AW'($urandom);
      exp_acc.pseudo_write = 1'($urandom); exp_acc.refresh_replica = 1'($urandom);
      exp_acc.check_replica = 1'($urandom); exp_acc.rep_addr = RAW'($urandom);
      vec = {exp_cfg, exp_acc};
      shift_vec(vec, got);
      checks++;
      if (got !== prev) begin failures++; $display("scan_out did not return previous chain"); end
      checks++;
      if (scan_acc !== acc_t'('0)) begin failures++; $display("access word active without update"); end
      update = 1; @(negedge clk); update = 0;
      checks++;
      if (cfg !== exp_cfg) begin failures++; $display("cfg wrong"); end
      checks++;
      if (scan_acc !== exp_acc) begin failures++; $display("access word not presented after update"); end
      @(negedge clk);
      checks++;
      if (scan_acc !== acc_t'('0)) begin failures++; $display("access word lasted more than one cycle"); end
      prev = vec;
    end
    // capture: read data replaces the wdata field
    rdata = 32'hA5C3_0F96;
    capture = 1; @(negedge clk); capture = 0;
    exp_acc = acc_t'(prev[$bits(acc_t)-1:0]);
    exp_acc.wdata = rdata;
    shift_vec('0, got);
    checks++;
    if (got !== {prev[W-1 -: $bits(cfg_t)], exp_acc}) begin failures++; $display("capture wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
