// lut_addr_gen: LUT address generator.
//
// A counter that walks through the entries of every pattern LUT so that each
// LUT's contents leave it one bit per clock, in address order 0, 1, ...,
// CHAIN_LEN-1, and then wraps to 0. All LUTs share this address. A 5-input LUT
// holds 32 bits, which is why CHAIN_LEN defaults to 32, the chain length used
// for the experiments.
//
// Interface: `en` advances the count by one on the rising clock edge; `addr`
// is the current entry; `last` is high during the enabled cycle that reads the
// last entry, so a sequencer can tell a chain load is complete. Reset
// (synchronous, active high) returns the address to 0; the reset style is this
// design's choice.
module lut_addr_gen #(
  parameter int unsigned CHAIN_LEN = 32,
  localparam int unsigned AW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [AW-1:0] addr,
  output logic          last
);

  localparam logic [AW-1:0] LAST_ADDR = AW'(CHAIN_LEN - 1);

  always_ff @(posedge clk) begin
    if (rst)
      addr <= '0;
    else if (en)
      addr <= (addr == LAST_ADDR) ? '0 : addr + 1'b1;
  end

  assign last = en && (addr == LAST_ADDR);

endmodule
