// tb_sel_ram: reads the default select-line RAM (the example's sequence,
// rows S4..S0 = 00000, 01101, 10110, 00000) in random order and checks each
// word one clock after its address (registered read).
module tb_sel_ram;
  localparam logic [4:0] ROW [4] = '{5'b00000, 5'b01101, 5'b10110, 5'b00000};
  logic clk = 0;
  logic [1:0] addr = 0, prev;
  logic [4:0] sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sel_ram dut (.clk, .addr, .sel);

  initial begin
    @(posedge clk);
    for (int k = 0; k < 64; k++) begin
      prev = addr;
      @(posedge clk);
      #1;
      checks++;
      if (sel != ROW[prev]) begin
        failures++;
        $display("FAIL word %0d: %b, expected %b", prev, sel, ROW[prev]);
      end
      addr = (k < 4) ? 2'(k + 1) : 2'($urandom_range(0, 3));
      #1;
      checks++;
      if (sel != ROW[prev]) begin
        failures++;
        $display("FAIL output changed before the clock edge");
      end
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
