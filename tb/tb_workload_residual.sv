// tb_workload_residual: residual-coding workload on the 4-symbol and the
// 2-symbol encoder side by side.
//
// Each encoder codes three slices of CIF-frame size (396 macroblocks) of
// synthetic residual data at three coefficient densities (standing for QP
// 20, 30 and 40); the bitstreams must match the reference model, and the
// achieved bins per cycle are printed per slice.
`timescale 1ns/1ps
module tb_workload_residual;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done4, done2;
  int   checks4, failures4, checks2, failures2;

  ae_workload_bench #(.N(4)) u_n4 (.clk(clk), .done(done4), .checks(checks4), .failures(failures4));
  ae_workload_bench #(.N(2)) u_n2 (.clk(clk), .done(done2), .checks(checks2), .failures(failures2));

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks2, failures4 + failures2 + 1);
    $finish;
  end

  initial begin
    wait (done4 && done2);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks2, failures4 + failures2);
    $finish;
  end
endmodule
