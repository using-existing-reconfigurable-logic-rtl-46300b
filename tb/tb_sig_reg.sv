// tb_sig_reg: random signatures and capture strobes; the register must hold
// the last captured value and clear on reset.
module tb_sig_reg;
  logic clk = 0, rst = 1, cap = 0;
  logic [31:0] sin = '0, q, held;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sig_reg dut (.clk, .rst, .capture(cap), .sig_in(sin), .sig_q(q));

  initial begin
    @(posedge clk); #1;
    held = '0;
    checks++; if (q != '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      sin = $urandom;
      cap = 1'($urandom_range(0, 4) == 0);
      if (cap) held = sin;
      @(posedge clk); #1;
      checks++;
      if (q != held) begin failures++; $display("FAIL q=%h expected %h", q, held); end
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
