// tb_scan_ctrl: checks the sequencer (see scan_ctrl_check) in two setups:
//   u_def : defaults, chains as long as one 5-entry LUT pass, 4 patterns,
//           2 die-reset clocks, 2 wait clocks (2 + 4*6 + 5 + 2 = 33 clocks);
//   u_seg : chains of two LUT passes, 3 patterns, 1 die-reset clock, 3 wait
//           clocks (1 + 3*11 + 10 + 3 = 47 clocks).
module tb_scan_ctrl;
  logic clk = 0, start = 0;
  logic f_def, f_seg;
  int c_def, c_seg, x_def, x_seg;

  always #5 clk = ~clk;

  scan_ctrl_check u_def (.clk, .start, .finished(f_def), .checks(c_def), .failures(x_def));
  scan_ctrl_check #(.L(5), .P(3), .SEG(2), .RSTC(1), .SWAIT(3)) u_seg (
    .clk, .start, .finished(f_seg), .checks(c_seg), .failures(x_seg));

  initial begin
    #1 start = 1;
    wait (f_def && f_seg);
    $display("TB_RESULT checks=%0d failures=%0d", c_def + c_seg, x_def + x_seg);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_def + c_seg, x_def + x_seg + 1);
    $finish;
  end
endmodule
