// tb_lut_layer: reads every address of every LUT.
//   u_ex  : default contents, the example's LUT words 01111, 10000, 10110,
//           11001 (written here with the first-shifted bit leftmost).
//   u_big : six 32-bit LUTs (5-input LUT size) with contents generated here.
module tb_lut_layer;
  localparam logic [4:0] WORD [4] = '{5'b01111, 5'b10000, 5'b10110, 5'b11001};
  localparam int NB = 6, LB = 32;

  function automatic logic [NB-1:0][LB-1:0] big_init();
    logic [NB-1:0][LB-1:0] w;
    for (int k = 0; k < NB; k++) w[k] = 32'h9E37_79B9 * (k + 1) ^ (32'h1234_5678 >> k);
    return w;
  endfunction
  localparam logic [NB-1:0][LB-1:0] BIG = big_init();

  logic [2:0] a_ex;
  logic [3:0] o_ex;
  logic [4:0] a_big;
  logic [NB-1:0] o_big;
  int checks = 0, failures = 0;

  lut_layer u_ex (.addr(a_ex), .lut_out(o_ex));
  lut_layer #(.N_LUTS(NB), .CHAIN_LEN(LB), .LUT_INIT(BIG)) u_big (.addr(a_big), .lut_out(o_big));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) begin
      a_ex = 3'(i);
      #1;
      for (int k = 0; k < 4; k++)
        check(o_ex[k] == WORD[k][4-i], $sformatf("example LUT%0d address %0d", k, i));
    end
    for (int i = 0; i < LB; i++) begin
      a_big = 5'(i);
      #1;
      for (int k = 0; k < NB; k++)
        check(o_big[k] == ((32'h9E37_79B9 * (k + 1) ^ (32'h1234_5678 >> k)) >> i) % 2,
              $sformatf("32-bit LUT%0d address %0d", k, i));
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
