// workload_run: runs the tester on a synthetic test set of a given size.
//
// Used by tb_workloads. It builds, at elaboration time, the whole tester
// configuration the way the offline flow would:
//   1. A pseudo-random test set: N chains x P patterns x 32 bits, each bit a
//      care bit with probability CARE_PCT percent, otherwise X. The last chain
//      has LAST_LEN real cells; the bits past them are padding (X).
//   2. Merging, in the order all patterns of chain 0, then chain 1, ...:
//      a slice is merged into the first pool LUT whose care bits agree with
//      it (X merged with a value takes the value), otherwise it becomes a new
//      LUT. If that LUT is not yet wired to the chain's multiplexer it is
//      wired to the next free input; the input number is recorded as the
//      chain's select value for the pattern.
//   3. Adjacent fill of every LUT word: an X bit copies the last care bit
//      shifted before it (leading X bits copy the first care bit; an all-X
//      word is 0).
// The tester is then simulated against the behavioural die model, and every
// care bit of every slice is checked on the scan-data bus, using the pattern
// generator again at run time, so the check does not rely on the merge. The
// storage figures (original bits, LUT bits, select bits) and the die's
// scan-shift toggle count are printed.
module workload_run
  import tester_pkg::*;
#(
  parameter string       NAME     = "synthetic",
  parameter int unsigned N        = 5,
  parameter int unsigned P        = 40,
  parameter int unsigned LAST_LEN = 28,
  parameter int unsigned CARE_PCT = 8,
  parameter int unsigned SEED     = 1
) (
  input  logic clk,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned L = 32;
  localparam int unsigned NS = N * P;               // slices
  localparam int unsigned RES_N = 2 + N + 3 * NS;   // result words
  localparam int unsigned MAP_B = 2 + N;            // wiring, c*P + j
  localparam int unsigned SEL_B = MAP_B + NS;       // select values, p*N + c
  localparam int unsigned LUT_B = SEL_B + NS;       // LUT words

  // Pattern generator: {care mask, values} of chain c, pattern p.
  function automatic logic [63:0] slice(int unsigned c, int unsigned p);
    logic [31:0] msk, val;
    for (int unsigned b = 0; b < L; b++) begin
      logic [31:0] h;
      h = SEED * 32'h9E37_79B9 ^ (c * 32'h85EB_CA6B) ^ (p * 32'hC2B2_AE35) ^ (b * 32'h27D4_EB2F);
      h = h ^ (h >> 15);
      h = h * 32'h2C1B_3C6D;
      h = h ^ (h >> 12);
      h = h * 32'h297A_2D39;
      h = h ^ (h >> 15);
      msk[b] = ((h % 100) < CARE_PCT) && !(c == N - 1 && b >= LAST_LEN);
      val[b] = msk[b] & h[20];
    end
    return {msk, val};
  endfunction

  typedef logic [RES_N-1:0][31:0] res_t;

  function automatic res_t merge_all();
    res_t r;
    logic [31:0] pm [NS];
    logic [31:0] pv [NS];
    int unsigned wire_lut [NS];   // c*P + j -> LUT
    int unsigned nin [N];
    int unsigned selv [NS];       // p*N + c -> input
    int unsigned nl, maxin;
    nl = 0;
    for (int unsigned c = 0; c < N; c++) nin[c] = 0;
    for (int unsigned c = 0; c < N; c++)
      for (int unsigned p = 0; p < P; p++) begin
        logic [63:0] s;
        logic [31:0] m, v;
        int unsigned k, j;
        s = slice(c, p);
        m = s[63:32];
        v = s[31:0];
        k = nl;
        for (int unsigned q = 0; q < nl; q++)
          if (k == nl && (((pv[q] ^ v) & pm[q] & m) == 0)) k = q;
        if (k == nl) begin
          pm[k] = m;
          pv[k] = v;
          nl++;
        end else begin
          pv[k] = (pv[k] & pm[k]) | (v & m);
          pm[k] = pm[k] | m;
        end
        j = nin[c];
        for (int unsigned q = 0; q < nin[c]; q++)
          if (j == nin[c] && wire_lut[c * P + q] == k) j = q;
        if (j == nin[c]) begin
          wire_lut[c * P + j] = k;
          nin[c] = nin[c] + 1;
        end
        selv[p * N + c] = j;
      end
    for (int unsigned i = 0; i < RES_N; i++) r[i] = 32'd0;
    maxin = 1;
    for (int unsigned c = 0; c < N; c++) if (nin[c] > maxin) maxin = nin[c];
    r[0] = nl;
    r[1] = maxin;
    for (int unsigned c = 0; c < N; c++) r[2 + c] = nin[c];
    for (int unsigned i = 0; i < NS; i++) begin
      r[MAP_B + i] = (i % P < nin[i / P]) ? wire_lut[i] : 0;
      r[SEL_B + i] = selv[i];
    end
    for (int unsigned k = 0; k < nl; k++) begin
      logic [31:0] w, mk;
      logic last;
      w = pv[k];
      mk = pm[k];
      last = 1'b0;
      for (int b = L - 1; b >= 0; b--) if (mk[b]) last = w[b];   // first care bit
      for (int unsigned b = 0; b < L; b++) begin
        if (mk[b]) last = w[b];
        else w[b] = last;
      end
      r[LUT_B + k] = w;
    end
    return r;
  endfunction

  localparam res_t RES = merge_all();
  localparam int unsigned NL     = RES[0];
  localparam int unsigned MAX_IN = RES[1];

  typedef int unsigned inputs_t [N];
  typedef int unsigned map_t [N * MAX_IN];

  function automatic inputs_t mk_inputs();
    inputs_t a;
    for (int unsigned c = 0; c < N; c++) a[c] = RES[2 + c];
    return a;
  endfunction

  function automatic map_t mk_map();
    map_t a;
    for (int unsigned c = 0; c < N; c++)
      for (int unsigned j = 0; j < MAX_IN; j++) a[c * MAX_IN + j] = RES[MAP_B + c * P + j];
    return a;
  endfunction

  function automatic int unsigned mk_sel_bits();
    int unsigned s = 0;
    for (int unsigned c = 0; c < N; c++) s += sel_width(RES[2 + c]);
    return s;
  endfunction

  localparam inputs_t     MUX_INPUTS = mk_inputs();
  localparam map_t        MUX_MAP    = mk_map();
  localparam int unsigned SB         = mk_sel_bits();

  function automatic logic [P-1:0][SB-1:0] mk_sel_init();
    logic [P-1:0][SB-1:0] a;
    a = '0;
    for (int unsigned p = 0; p < P; p++) begin
      logic [SB-1:0] w;
      int unsigned off;
      w = '0;
      off = 0;
      for (int unsigned c = 0; c < N; c++) begin
        int unsigned sw;
        sw = sel_width(RES[2 + c]);
        for (int unsigned b = 0; b < sw; b++) w[off + b] = RES[SEL_B + p * N + c][b];
        off += sw;
      end
      a[p] = w;
    end
    return a;
  endfunction

  function automatic logic [NL-1:0][L-1:0] mk_lut_init();
    logic [NL-1:0][L-1:0] a;
    for (int unsigned k = 0; k < NL; k++) a[k] = RES[LUT_B + k];
    return a;
  endfunction

  localparam logic [P-1:0][SB-1:0] SEL_INIT = mk_sel_init();
  localparam logic [NL-1:0][L-1:0] LUT_INIT = mk_lut_init();

  logic          rst;
  logic [N-1:0]  scan_data;
  logic          scan_en, asic_rst, done, pass;
  logic [31:0]   sig;
  longint unsigned toggles;

  fpga_tester #(
    .CHAIN_LEN (L),
    .N_LUTS    (NL),
    .N_CHAINS  (N),
    .N_PATTERNS(P),
    .MAX_IN    (MAX_IN),
    .SEL_BITS  (SB),
    .MUX_INPUTS(MUX_INPUTS),
    .MUX_MAP   (MUX_MAP),
    .LUT_INIT  (LUT_INIT),
    .SEL_INIT  (SEL_INIT)
  ) u_tester (
    .clk, .rst, .asic_sig(sig), .scan_data, .scan_en, .asic_rst,
    .test_done(done), .test_pass(pass));

  asic_model #(.N_CHAINS(N), .CHAIN_LEN(L)) u_die (
    .clk, .rst(asic_rst), .scan_en, .scan_in(scan_data), .sig, .toggles);

  localparam int unsigned T_DONE = 2 + P * (L + 1) + L + 2;

  initial begin
    int unsigned care = 0, shared = 0;
    rst = 1;
    finished = 0;
    checks = 0;
    failures = 0;
    wait (start);
    @(posedge clk);
    rst <= 0;
    // Outputs after edge k show stage-0 cycle k-1 (see fpga_tester).
    for (int unsigned k = 1; k <= T_DONE; k++) begin
      int unsigned j;
      @(posedge clk);
      #1;
      j = k - 1;
      if (j >= 2 && j < 2 + P * (L + 1)) begin
        int unsigned p, b;
        p = (j - 2) / (L + 1);
        b = (j - 2) % (L + 1);
        if (b < L) begin
          checks++;
          if (!scan_en) failures++;
          for (int unsigned c = 0; c < N; c++) begin
            logic [63:0] s;
            s = slice(c, p);
            if (s[32 + b]) begin
              care++;
              checks++;
              if (scan_data[c] != s[b]) begin
                failures++;
                if (failures < 10) $display("FAIL %s chain %0d pattern %0d bit %0d", NAME, c, p, b);
              end
            end
          end
        end
      end
    end
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL %s: test_done not high after %0d clocks", NAME, T_DONE);
    end
    for (int unsigned k = 0; k < NL; k++) begin
      int unsigned users;
      users = 0;
      for (int unsigned c = 0; c < N; c++) begin
        bit used;
        used = 0;
        for (int unsigned j = 0; j < MUX_INPUTS[c]; j++) if (MUX_MAP[c * MAX_IN + j] == k) used = 1;
        users += used;
      end
      if (users > 1) shared++;
    end
    $display("%s: %0d chains x %0d patterns x %0d bits = %0d bits; %0d LUTs = %0d bits (%0d%% less); %0d select lines x %0d patterns = %0d bits; LUT+select %0d%% less",
             NAME, N, P, L, N * P * L, NL, NL * L, 100 - (100 * NL * L) / (N * P * L), SB, P, SB * P,
             100 - (100 * (NL * L + SB * P)) / (N * P * L));
    $display("%s: widest mux %0d inputs, %0d LUTs feed more than one chain, %0d care bits checked, %0d scan-shift toggles",
             NAME, MAX_IN, shared, care, toggles);
    checks++;
    if (care == 0 || NL >= N * P) begin
      failures++;
      $display("FAIL %s: no merging happened", NAME);
    end
    finished = 1;
  end

endmodule
