// sel_ram: the select-line RAM ("RAM layer").
//
// Holds the predetermined multiplexer select values: word p is the select
// word applied to every chain multiplexer while pattern p is shifted in.
// Storing the select lines in a memory rather than in the LUT fabric lets
// the multiplexers stay narrow and lets the same LUT be chosen for many
// patterns. The read is synchronous, as in an FPGA block RAM or a registered
// distributed RAM: `sel` shows the word addressed in the previous cycle.
//
// Contents: SEL_INIT[p] is the select word of pattern p; the chain fields are
// packed with chain 0 in the least significant bits. The defaults are the
// select-line sequence of the three-chain worked example (S4..S0):
// 00000, 01101, 10110, 00000. The memory is initialised from SEL_INIT and is
// not written afterwards. The registered read and the absence of a write port
// are this design's choices.
module sel_ram #(
  parameter int unsigned N_PATTERNS = 4,
  parameter int unsigned SEL_BITS   = 5,
  parameter logic [N_PATTERNS-1:0][SEL_BITS-1:0] SEL_INIT = {5'b00000, 5'b10110, 5'b01101, 5'b00000},
  localparam int unsigned AW = (N_PATTERNS > 1) ? $clog2(N_PATTERNS) : 1
) (
  input  logic                clk,
  input  logic [AW-1:0]       addr,
  output logic [SEL_BITS-1:0] sel
);

  logic [SEL_BITS-1:0] mem [N_PATTERNS];

  initial begin
    for (int p = 0; p < N_PATTERNS; p++) mem[p] = SEL_INIT[p];
  end

  always_ff @(posedge clk) begin
    sel <= (32'(addr) < N_PATTERNS) ? mem[addr] : '0;
  end

endmodule
