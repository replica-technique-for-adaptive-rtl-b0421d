// tb_refresh_tracking: refresh timing against retention over write activity
// and over global retention shifts. Three test chips run side by side: one at
// the nominal model retention, one at half of it and one at double,
// standing for supply or process corners that move the array and the
// replica column together. Each sweeps the write activity (1, 1/2, 1/4, 1/10,
// 1/20) and checks, in refresh_bench, that the automatically timed refresh
// always comes shortly before the array's measured minimum retention.
module tb_refresh_tracking;
  logic clk = 0;
  always #5 clk = ~clk;
  logic d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;

  refresh_bench #(.SCALE_NUM(1), .SCALE_DEN(2)) b_low  (.clk, .done(d0), .checks(c0), .failures(f0));
  refresh_bench #(.SCALE_NUM(1), .SCALE_DEN(1)) b_nom  (.clk, .done(d1), .checks(c1), .failures(f1));
  refresh_bench #(.SCALE_NUM(2), .SCALE_DEN(1)) b_high (.clk, .done(d2), .checks(c2), .failures(f2));

  initial begin
    fork
      begin
        repeat (3000000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
        $finish;
      end
    join_none
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
