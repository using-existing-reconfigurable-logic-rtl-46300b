// tb_workloads: the tester at three of the benchmark sizes of the published
// evaluation, with 32-bit chains (5-input LUTs), on synthetic test sets
// (see workload_run, which also merges them into LUTs at elaboration).
// Chains, patterns and the cells of the last chain follow the benchmark table;
// the last chain holds PI + FF - 32*(chains-1) cells. The care-bit density
// (45 percent) is this testbench's own choice; it gives LUT and select-line
// counts of the same order as the published ones. Each run checks every
// care bit on the scan-data bus and the cycle in which the test completes.
module tb_workloads;
  logic clk = 0;
  logic start = 0;
  always #5 clk = ~clk;

  logic f_quad, f_des, f_col;
  int   c_quad, c_des, c_col, x_quad, x_des, x_col;

  // quadratic: 36 PI + 120 FF = 156 cells, 5 chains, 40 patterns.
  workload_run #(.NAME("quadratic"), .N(5), .P(40), .LAST_LEN(28), .CARE_PCT(45), .SEED(11)) u_quad (
    .clk, .start, .finished(f_quad), .checks(c_quad), .failures(x_quad));
  // des56: 134 PI + 193 FF = 327 cells, 11 chains, 113 patterns.
  workload_run #(.NAME("des56"), .N(11), .P(113), .LAST_LEN(7), .CARE_PCT(45), .SEED(23)) u_des (
    .clk, .start, .finished(f_des), .checks(c_des), .failures(x_des));
  // colorconv: 299 PI + 584 FF = 883 cells, 28 chains, 82 patterns.
  workload_run #(.NAME("colorconv"), .N(28), .P(82), .LAST_LEN(19), .CARE_PCT(45), .SEED(37)) u_col (
    .clk, .start, .finished(f_col), .checks(c_col), .failures(x_col));

  initial begin
    #20 start = 1;
    wait (f_quad && f_des && f_col);
    $display("TB_RESULT checks=%0d failures=%0d", c_quad + c_des + c_col, x_quad + x_des + x_col);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_quad + c_des + c_col, x_quad + x_des + x_col + 1);
    $finish;
  end
endmodule
