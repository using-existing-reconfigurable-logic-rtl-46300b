// tb_lut_addr_gen: checks the LUT address generator at its default length
// (32 entries, one 5-input LUT) against a reference count: random enables,
// wrap from 31 to 0, `last` only on an enabled cycle at address 31, hold when
// not enabled, and return to 0 on reset.
module tb_lut_addr_gen;
  localparam int L = 32;
  logic clk = 0, rst = 1, en = 0;
  logic [4:0] addr;
  logic last;
  int checks = 0, failures = 0, wraps = 0, ref_addr = 0;

  always #5 clk = ~clk;

  lut_addr_gen dut (.clk, .rst, .en, .addr, .last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 400; k++) begin
      en <= (k < 40) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      #1;
      @(negedge clk);
      check(int'(addr) == ref_addr, $sformatf("addr %0d, expected %0d", addr, ref_addr));
      check(last == (en && ref_addr == L - 1), "last");
      @(posedge clk);
      if (en) begin
        if (ref_addr == L - 1) begin ref_addr = 0; wraps++; end
        else ref_addr++;
      end
    end
    rst <= 1;
    @(posedge clk); #1;
    check(addr == 0, "reset returns to 0");
    check(wraps >= 5, "counter wrapped several times");
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
