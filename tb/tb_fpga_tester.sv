// tb_fpga_tester: end-to-end test of the LUT-based scan tester.
//
// Two testers with the default configuration (the three-chain, four-pattern,
// five-bit worked example) drive one behavioural die model. u_pass is given
// the golden signature that this testbench computes itself, by walking the
// expected scan data through the same die behaviour (function golden_sig);
// u_fail keeps a golden signature that differs from it, so it must report a
// failing test. The expected scan data come from the example's select-line
// sequence and LUT words, written here in the example's own notation (leftmost
// character = first bit shifted), independently of the RTL's parameters.
//
// Checked every cycle: asic_rst, scan_en and every scan-data bit against the
// expected trace (die reset, per pattern 5 shift clocks and one capture clock,
// 5 unload clocks of zeros, signature wait), the cycle in which test_done
// rises, and test_pass of both testers. A third tester, u_seg, treats the same
// contents as 10-cell chains loaded from two LUTs in sequence (SEGMENTS = 2,
// two patterns, select words 0/1 for pattern 0 and 2/3 for pattern 1); its
// scan bus and completion time are checked too. Counted mechanisms: die reset,
// pattern shift, capture, unload, a LUT feeding more than one chain, a LUT
// reused by a chain on a later pattern, a chain load spanning two LUTs,
// signature pass and signature fail.
module tb_fpga_tester;
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
  logic [N-1:0] scan_data, scan_data_f;
  logic scan_en, asic_rst, done, pass, scan_en_f, asic_rst_f, done_f, pass_f;
  logic [M-1:0] sig;
  longint unsigned toggles;

  always #5 clk = ~clk;

  fpga_tester #(.GOLDEN(GOLD)) u_pass (
    .clk, .rst, .asic_sig(sig), .scan_data, .scan_en, .asic_rst,
    .test_done(done), .test_pass(pass));

  fpga_tester u_fail (
    .clk, .rst, .asic_sig(sig), .scan_data(scan_data_f), .scan_en(scan_en_f),
    .asic_rst(asic_rst_f), .test_done(done_f), .test_pass(pass_f));

  logic [N-1:0] scan_data_s;
  logic scan_en_s, asic_rst_s, done_s, pass_s;
  fpga_tester #(.N_PATTERNS(2), .SEGMENTS(2)) u_seg (
    .clk, .rst, .asic_sig(sig), .scan_data(scan_data_s), .scan_en(scan_en_s),
    .asic_rst(asic_rst_s), .test_done(done_s), .test_pass(pass_s));

  asic_model #(.N_CHAINS(N), .CHAIN_LEN(L), .SIG_BITS(M), .POLY(POLY)) u_die (
    .clk, .rst(asic_rst), .scan_en, .scan_in(scan_data), .sig, .toggles);

  int checks = 0, failures = 0;
  int n_reset = 0, n_shift = 0, n_capture = 0, n_unload = 0, n_fanout = 0, n_reuse = 0;
  int n_pass = 0, n_fail = 0, n_seg = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Expected outputs after the k-th rising edge following reset release.
  localparam int T_DONE = RSTC + P*(L+1) + L + SWAIT;
  localparam int T_DONE_SEG = RSTC + 2*(2*L+1) + 2*L + SWAIT;
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
    check(scan_data_f == scan_data && scan_en_f == scan_en && asic_rst_f == asic_rst,
          $sformatf("second tester differs at edge %0d", k));
    check(done == (k >= T_DONE), $sformatf("test_done at edge %0d", k));
    // Two-LUT chain loads: 2 patterns of 2*L shift clocks.
    e_en = 0; e_data = '0;
    if (j >= RSTC && j < RSTC + 2*(2*L+1)) begin
      int q = j - RSTC, p = q / (2*L+1), b = q % (2*L+1);
      if (b < 2*L) begin
        e_en = 1;
        for (int c = 0; c < N; c++) e_data[c] = exp_bit(2*p + b / L, c, b % L);
        if (b == L) n_seg++;
      end
    end else if (j >= RSTC + 2*(2*L+1) && j < RSTC + 2*(2*L+1) + 2*L) e_en = 1;
    check(asic_rst_s == (j < RSTC) && scan_en_s == e_en && scan_data_s == e_data,
          $sformatf("two-LUT chains at edge %0d: data %b expected %b, scan_en %b", k, scan_data_s, e_data, scan_en_s));
    check(done_s == (k >= T_DONE_SEG), $sformatf("two-LUT chains: test_done at edge %0d", k));
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
    for (int k = 1; k <= T_DONE_SEG + 3; k++) begin
      @(posedge clk);
      #1;
      expect_cycle(k);
    end
    check(sig == GOLD, $sformatf("die signature %h, expected %h", sig, GOLD));
    check(pass === 1'b1, "tester with the right golden signature must pass");
    check(pass_f === 1'b0, "tester with a wrong golden signature must fail");
    check(GOLD != '0, "golden signature differs from the default");
    if (done && pass) n_pass++;
    if (done_f && !pass_f) n_fail++;
    $display("mechanisms: reset=%0d shift=%0d capture=%0d unload=%0d fanout=%0d reuse=%0d two_lut_loads=%0d pass=%0d fail=%0d toggles=%0d",
             n_reset, n_shift, n_capture, n_unload, n_fanout, n_reuse, n_seg, n_pass, n_fail, toggles);
    check(n_reset == RSTC && n_shift == P*L && n_capture == P && n_unload == L, "phase counts");
    check(n_fanout > 0, "a LUT fans out to two chains");
    check(n_reuse > 0, "a LUT is reused by a chain");
    check(n_seg == 2, "chain loads spanning two LUTs");
    check(n_pass > 0 && n_fail > 0, "both signature outcomes seen");
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
