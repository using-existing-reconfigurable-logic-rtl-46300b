// tb_ram_addr_gen: checks the word counter and its look-ahead address at its
// default (4 words) and with 5 words (wrap at a count that is not a power of
// two) against a reference count under random `advance`.
module tb_ram_addr_gen;
  logic clk = 0, rst = 1, adv = 0;
  logic [1:0] a4, n4;
  logic [2:0] a5, n5;
  logic l4, l5;
  int checks = 0, failures = 0, r4 = 0, r5 = 0, wraps = 0;

  always #5 clk = ~clk;

  ram_addr_gen u4 (.clk, .rst, .advance(adv), .addr(a4), .addr_next(n4), .last(l4));
  ram_addr_gen #(.N_PATTERNS(5)) u5 (.clk, .rst, .advance(adv), .addr(a5), .addr_next(n5), .last(l5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 200; k++) begin
      adv <= 1'($urandom_range(0, 1));
      @(negedge clk);
      check(int'(a4) == r4 && l4 == (r4 == 3), $sformatf("4 patterns: addr %0d expected %0d", a4, r4));
      check(int'(a5) == r5 && l5 == (r5 == 4), $sformatf("5 patterns: addr %0d expected %0d", a5, r5));
      check(int'(n4) == (adv ? (r4 + 1) % 4 : r4), "4 patterns: look-ahead address");
      check(int'(n5) == (adv ? (r5 + 1) % 5 : r5), "5 patterns: look-ahead address");
      @(posedge clk);
      if (adv) begin
        r4 = (r4 + 1) % 4;
        if (r5 == 4) wraps++;
        r5 = (r5 + 1) % 5;
      end
    end
    check(wraps > 3, "wrapped");
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
