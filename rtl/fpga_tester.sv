// fpga_tester: LUT-based scan tester for a die in a 3D stack.
//
// An FPGA die in the stack applies stored ATPG patterns directly to many
// short scan chains of a neighbouring die over TSVs. Instead of storing every
// pattern of every chain, pattern slices that agree in all their specified
// (non-X) bits are merged offline into one LUT word, and the remaining X bits
// are filled. The FPGA then holds only the pool of merged LUT words plus, per
// pattern, the select value of each chain's multiplexer:
//
//   lut_addr_gen --addr--> lut_layer --N_LUTS bits--> mux_layer --N_CHAINS--> scan_reg --> scan_data
//   ram_addr_gen --addr_next--> sel_ram --SEL_BITS--^
//   scan_ctrl: paces both address generators; drives scan_en and asic_rst
//   asic_sig --> sig_reg --> sig_checker (golden compare) --> test_pass
//
// A scan chain holds SEGMENTS*CHAIN_LEN cells. With SEGMENTS = 1 (a chain
// as long as a LUT, the usual case) each pattern has one select word; for
// longer chains several LUTs are unloaded in sequence, each with its own
// select word, so select word p*SEGMENTS + s drives LUT pass s of pattern p.
//
// Operation after reset (see scan_ctrl): die reset for RST_CYCLES clocks;
// for each pattern SEGMENTS*CHAIN_LEN shift clocks and one capture clock;
// SEGMENTS*CHAIN_LEN unload clocks; SIG_WAIT clocks, after which the die's
// signature is registered and compared with GOLDEN. `test_done` then stays
// high and `test_pass` tells the result. One test takes
//   RST_CYCLES + N_PATTERNS*(SEGMENTS*CHAIN_LEN+1) + SEGMENTS*CHAIN_LEN + SIG_WAIT
// clocks after reset. scan_data, scan_en and asic_rst are all registered and
// change together; the die is expected to shift on the clock edge that ends
// a cycle with scan_en high and to capture on one with scan_en low.
//
// Configuration: LUT_INIT (LUT words), MUX_INPUTS and MUX_MAP (which LUT is
// wired to which multiplexer input of which chain) and SEL_INIT (select words)
// are the output of the offline merging step; GOLDEN comes from simulating the
// die. The defaults are the three-chain, four-pattern, five-bit worked example
// with its four merged LUT words and its select-line sequence. The structure
// (address generators, LUT layer, RAM layer, multiplexer layer, scan register,
// scan-enable/reset generator, signature register and checker) follows the
// published tester; the control timing, zero fill outside loads, the unload
// phase and the pass qualification are this design's own.
module fpga_tester #(
  parameter int unsigned CHAIN_LEN  = 5,
  parameter int unsigned N_LUTS     = 4,
  parameter int unsigned N_CHAINS   = 3,
  parameter int unsigned N_PATTERNS = 4,
  parameter int unsigned SEGMENTS   = 1,
  parameter int unsigned MAX_IN     = 4,
  parameter int unsigned SEL_BITS   = 5,
  parameter int unsigned MUX_INPUTS [N_CHAINS] = '{3, 2, 3},
  parameter int unsigned MUX_MAP [N_CHAINS*MAX_IN] = '{0, 1, 2, 0,  2, 3, 0, 0,  3, 0, 1, 0},
  parameter logic [N_LUTS-1:0][CHAIN_LEN-1:0] LUT_INIT = {5'b10011, 5'b01101, 5'b00001, 5'b11110},
  parameter logic [N_PATTERNS*SEGMENTS-1:0][SEL_BITS-1:0] SEL_INIT = {5'b00000, 5'b10110, 5'b01101, 5'b00000},
  parameter int unsigned SIG_BITS   = 32,
  parameter logic [SIG_BITS-1:0] GOLDEN = '0,
  parameter int unsigned RST_CYCLES = 2,
  parameter int unsigned SIG_WAIT   = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SIG_BITS-1:0] asic_sig,
  output logic [N_CHAINS-1:0] scan_data,
  output logic                scan_en,
  output logic                asic_rst,
  output logic                test_done,
  output logic                test_pass
);

  localparam int unsigned LAW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1;
  localparam int unsigned N_WORDS = N_PATTERNS * SEGMENTS;  // select words
  localparam int unsigned RAW = (N_WORDS > 1) ? $clog2(N_WORDS) : 1;

  logic [LAW-1:0]      lut_addr;
  logic                lut_last;
  logic [RAW-1:0]      ram_addr, ram_addr_next;
  logic                pat_last;
  logic [N_LUTS-1:0]   lut_bits;
  logic [SEL_BITS-1:0] sel;
  logic [N_CHAINS-1:0] chain_bits;
  logic                shift, unload, pat_advance, sig_capture, done;
  logic [SIG_BITS-1:0] sig_q;

  scan_ctrl #(
    .SEGMENTS  (SEGMENTS),
    .RST_CYCLES(RST_CYCLES),
    .SIG_WAIT  (SIG_WAIT)
  ) u_ctrl (
    .clk, .rst,
    .lut_last, .pat_last,
    .shift, .unload, .pat_advance,
    .scan_en, .asic_rst,
    .sig_capture, .done
  );

  lut_addr_gen #(.CHAIN_LEN(CHAIN_LEN)) u_lut_addr (
    .clk, .rst,
    .en  (shift || unload),
    .addr(lut_addr),
    .last(lut_last)
  );

  lut_layer #(
    .N_LUTS   (N_LUTS),
    .CHAIN_LEN(CHAIN_LEN),
    .LUT_INIT (LUT_INIT)
  ) u_luts (
    .addr   (lut_addr),
    .lut_out(lut_bits)
  );

  ram_addr_gen #(.N_PATTERNS(N_WORDS)) u_ram_addr (
    .clk, .rst,
    .advance  (pat_advance),
    .addr     (ram_addr),
    .addr_next(ram_addr_next),
    .last   (pat_last)
  );

  sel_ram #(
    .N_PATTERNS(N_WORDS),
    .SEL_BITS  (SEL_BITS),
    .SEL_INIT  (SEL_INIT)
  ) u_sel_ram (
    .clk,
    .addr(ram_addr_next),
    .sel
  );

  mux_layer #(
    .N_LUTS    (N_LUTS),
    .N_CHAINS  (N_CHAINS),
    .MAX_IN    (MAX_IN),
    .SEL_BITS  (SEL_BITS),
    .MUX_INPUTS(MUX_INPUTS),
    .MUX_MAP   (MUX_MAP)
  ) u_mux (
    .lut_in    (lut_bits),
    .sel,
    .chain_bits
  );

  scan_reg #(.N_CHAINS(N_CHAINS)) u_scan_reg (
    .clk, .rst,
    .load(shift),
    .d   (chain_bits),
    .q   (scan_data)
  );

  sig_reg #(.SIG_BITS(SIG_BITS)) u_sig_reg (
    .clk, .rst,
    .capture(sig_capture),
    .sig_in (asic_sig),
    .sig_q
  );

  sig_checker #(
    .SIG_BITS(SIG_BITS),
    .GOLDEN  (GOLDEN)
  ) u_check (
    .sig  (sig_q),
    .valid(done),
    .pass (test_pass)
  );

  assign test_done = done;

  // The RAM address stays inside the select memory while patterns shift.
  always @(posedge clk) begin
    if (!rst && shift) a_sel_addr_in_range: assert (32'(ram_addr) < N_WORDS);
  end

endmodule
