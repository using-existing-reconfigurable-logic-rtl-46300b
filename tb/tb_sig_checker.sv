// tb_sig_checker: a checker with golden signature 32'hC0FF_EE15 must pass
// exactly when valid is high and every bit matches; single-bit flips of the
// golden value and random values must fail.
module tb_sig_checker;
  localparam logic [31:0] G = 32'hC0FF_EE15;
  logic [31:0] sig;
  logic valid, pass;
  int checks = 0, failures = 0;

  sig_checker #(.GOLDEN(G)) dut (.sig, .valid, .pass);

  task automatic try(logic [31:0] s, logic v);
    sig = s; valid = v;
    #1;
    checks++;
    if (pass != (v && s == G)) begin
      failures++;
      $display("FAIL sig=%h valid=%b pass=%b", s, v, pass);
    end
  endtask

  initial begin
    try(G, 1); try(G, 0);
    for (int b = 0; b < 32; b++) try(G ^ (32'd1 << b), 1);
    for (int k = 0; k < 100; k++) try($urandom, 1);
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
