// tb_scan_reg: random data and load enables; the register must show the
// loaded bits one clock later, zeros after a cycle without load, and zeros
// after reset.
module tb_scan_reg;
  localparam int N = 8;
  logic clk = 0, rst = 1, load = 0;
  logic [N-1:0] d = '0, q, expq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_reg #(.N_CHAINS(N)) dut (.clk, .rst, .load, .d, .q);

  initial begin
    @(posedge clk); #1;
    checks++; if (q != '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      d = N'($urandom);
      load = 1'($urandom_range(0, 3) != 0);
      expq = load ? d : '0;
      @(posedge clk); #1;
      checks++;
      if (q != expq) begin failures++; $display("FAIL q=%b expected %b", q, expq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
