// tb_access_mux: drives three different random access words and checks that
// each mode selects its own source and that the unused encoding gives an
// idle access.
module tb_access_mux;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  acc_t ctrl_acc, scan_acc, ext_acc, acc, exp;
  mode_e mode;

  access_mux dut (.mode, .ctrl_acc, .scan_acc, .ext_acc, .acc);

  function automatic acc_t rnd_acc();
    logic [$bits(acc_t)-1:0] v;
    for (int b = 0; b < $bits(acc_t); b++) v[b] = 1'($urandom);
    return acc_t'(v);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      ctrl_acc = rnd_acc(); scan_acc = rnd_acc(); ext_acc = rnd_acc();
      mode = mode_e'(i % 4);
      #1;
      case (i % 4)
        0: exp = ctrl_acc;
        1: exp = scan_acc;
        2: exp = ext_acc;
        default: exp = '0;
      endcase
      checks++;
      if (acc !== exp) begin failures++; $display("mode %0d wrong selection", i % 4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
