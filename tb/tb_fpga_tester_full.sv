// tb_fpga_tester_full: one complete test with the tester exactly at its
// default parameters (the three-chain, four-pattern, five-bit worked example,
// golden signature left at its default of 0) driving a behavioural die model.
// The testbench computes the signature the die must return (function
// golden_sig); since it differs from the default golden value, the tester
// must finish with test_pass low. The expected scan data come from the example's select-line
// sequence and LUT words, written here in the example's own notation (leftmost
// character = first bit shifted), independently of the RTL's parameters.
//
// Checked every cycle: asic_rst, scan_en and every scan-data bit against the
// expected trace (die reset, per pattern 5 shift clocks and one capture clock,
// 5 unload clocks of zeros, signature wait), the cycle in which test_done
// rises, and test_pass of both testers. Counted mechanisms: die reset, pattern
// shift, capture, unload, one LUT feeding more than one chain, one
// LUT reused by a chain on a later pattern, signature mismatch.
module tb_fpga_tester_full;
  localparam int L = 5, N = 3, P = 4, M = 32, RSTC = 2, SWAIT = 2;
  localparam logic [M-1:0] POLY = 32'h04C1_1DB7;

  // LUT words as printed: leftmost character is shifted first.
  localparam logic [L-1:0] WORD [4] = '{5'b01111, 5'b10000, 5'b10110, 5'b11001};
  // LUT used by chain c for pattern p (select-line sequence + wiring).
  localparam int USE [P][N] = '{'{0, 2, 3}, '{1, 3, 0}, '{2, 3, 1}, '{0, 2, 3}};

  function automatic logic exp_bit(int p, int c, int b);
    return WORD[USE[p][c]][L-1-b];
  endfunction

  // Signature the die model must return after the whole test.
  function automatic logic [M-1:0] golden_sig();
    logic [L-1:0] st [N];
    logic [L-1:0] ns [N];
    logic [M-1:0] m;
    logic [N-1:0] so;
    m = '0;
    for (int c = 0; c < N; c++) st[c] = '0;
    for (int p = 0; p <= P; p++) begin
      for (int b = 0; b < L; b++) begin
        for (int c = 0; c < N; c++) begin
          logic [L-1:0] v;
          v = st[c];
          so[c] = v[L-1];
          st[c] = {v[L-2:0], (p < P) ? exp_bit(p, c, b) : 1'b0};
        end
        m = {m[M-2:0], 1'b0} ^ (m[M-1] ? POLY : '0);
        for (int c = 0; c < N; c++) m[c] ^= so[c];
      end
      if (p < P) begin
        for (int c = 0; c < N; c++) begin
          logic [L-1:0] v, here, next, prev;
          here = st[c]; next = st[(c+1)%N]; prev = st[(c+N-1)%N];
          for (int i = 0; i < L; i++)
            v[i] = here[i] ^ (next[i] & here[(i+1)%L]) ^ prev[(i+L-1)%L];
          ns[c] = v;
        end
        for (int c = 0; c < N; c++) st[c] = ns[c];
      end
    end
    return m;
  endfunction

  localparam logic [M-1:0] GOLD = golden_sig();

  logic clk = 0, rst = 1;
  logic [N-1:0] scan_data;
  logic scan_en, asic_rst, done, pass;
  logic [M-1:0] sig;
  longint unsigned toggles;

  always #5 clk = ~clk;

  fpga_tester u_dut (
    .clk, .rst, .asic_sig(sig), .scan_data, .scan_en, .asic_rst,
    .test_done(done), .test_pass(pass));

  asic_model #(.N_CHAINS(N), .CHAIN_LEN(L), .SIG_BITS(M), .POLY(POLY)) u_die (
    .clk, .rst(asic_rst), .scan_en, .scan_in(scan_data), .sig, .toggles);

  int checks = 0, failures = 0;
  int n_reset = 0, n_shift = 0, n_capture = 0, n_unload = 0, n_fanout = 0, n_reuse = 0;
  int n_fail = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Expected outputs after the k-th rising edge following reset release.
  localparam int T_DONE = RSTC + P*(L+1) + L + SWAIT;
  task automatic expect_cycle(int k);
    int j = k - 1;                 // stage-0 cycle whose outputs are visible now
    logic e_rst, e_en;
    logic [N-1:0] e_data;
    e_rst = 0; e_en = 0; e_data = '0;
    if (j < RSTC) begin
      e_rst = 1; n_reset++;
    end else if (j < RSTC + P*(L+1)) begin
      int q = j - RSTC, p = q / (L+1), b = q % (L+1);
      if (b < L) begin
        e_en = 1; n_shift++;
        for (int c = 0; c < N; c++) e_data[c] = exp_bit(p, c, b);
      end else begin
        n_capture++;
      end
    end else if (j < RSTC + P*(L+1) + L) begin
      e_en = 1; n_unload++;
    end
    check(asic_rst == e_rst, $sformatf("asic_rst at edge %0d", k));
    check(scan_en == e_en, $sformatf("scan_en at edge %0d", k));
    check(scan_data == e_data, $sformatf("scan_data at edge %0d: %b, expected %b", k, scan_data, e_data));
    check(done == (k >= T_DONE), $sformatf("test_done at edge %0d", k));
  endtask

  initial begin
    // Mechanisms visible in the configuration: sharing across chains and reuse across patterns.
    for (int lut = 0; lut < 4; lut++) begin
      int users;
      users = 0;
      for (int c = 0; c < N; c++) begin
        bit used;
        used = 0;
        for (int p = 0; p < P; p++) if (USE[p][c] == lut) used = 1;
        users += used;
      end
      if (users > 1) n_fanout++;
    end
    for (int c = 0; c < N; c++)
      for (int p = 1; p < P; p++)
        for (int q = 0; q < p; q++) if (USE[p][c] == USE[q][c]) begin n_reuse++; break; end

    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 1; k <= T_DONE + 3; k++) begin
      @(posedge clk);
      #1;
      expect_cycle(k);
    end
    check(sig == GOLD, $sformatf("die signature %h, expected %h", sig, GOLD));
    check(GOLD != '0, "golden signature differs from the default");
    check(done === 1'b1 && pass === 1'b0, "default golden signature must not match");
    if (done && !pass) n_fail++;
    $display("mechanisms: reset=%0d shift=%0d capture=%0d unload=%0d fanout=%0d reuse=%0d fail=%0d toggles=%0d",
             n_reset, n_shift, n_capture, n_unload, n_fanout, n_reuse, n_fail, toggles);
    check(n_reset == RSTC && n_shift == P*L && n_capture == P && n_unload == L, "phase counts");
    check(n_fanout > 0, "a LUT fans out to two chains");
    check(n_reuse > 0, "a LUT is reused by a chain");
    check(n_fail > 0, "signature mismatch seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
