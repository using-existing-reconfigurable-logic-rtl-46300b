// ram_addr_gen: RAM address generator.
//
// Counts select words. Its address selects the word of the select-line RAM
// that holds the multiplexer select values of the current pattern (or, for
// chains longer than one LUT, of the current LUT pass of the pattern; the
// tester then instantiates it with N_PATTERNS = patterns x passes). `advance`
// moves to the next word on the rising clock edge, wrapping to 0 after
// N_PATTERNS-1; `last` flags the final word. `addr_next` is the address the
// counter will hold after the coming edge (`addr`, or its successor while
// `advance` is high). A RAM with a registered read addressed by `addr_next`
// therefore outputs the word of `addr` in every cycle, with no gap when the
// word changes between two back-to-back LUT passes. Reset (synchronous, active
// high) returns to pattern 0. That it is a plain wrapping counter advanced by
// the sequencer is this design's choice; the block is only named in the
// tester's block diagram.
module ram_addr_gen #(
  parameter int unsigned N_PATTERNS = 4,
  localparam int unsigned AW = (N_PATTERNS > 1) ? $clog2(N_PATTERNS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          advance,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] addr_next,
  output logic          last
);

  localparam logic [AW-1:0] LAST_ADDR = AW'(N_PATTERNS - 1);

  always_comb begin
    if (rst)
      addr_next = '0;
    else if (advance)
      addr_next = (addr == LAST_ADDR) ? '0 : addr + 1'b1;
    else
      addr_next = addr;
  end

  always_ff @(posedge clk) addr <= addr_next;

  assign last = (addr == LAST_ADDR);

endmodule
