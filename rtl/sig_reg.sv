// sig_reg: signature register.
//
// Holds the M-bit signature that the die under test returns (for example the
// state of its output MISR). It loads `sig_in` on a clock edge where
// `capture` is high and keeps it until the next capture or reset
// (synchronous, active high, clears to 0). SIG_BITS is this design's choice.
module sig_reg #(
  parameter int unsigned SIG_BITS = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                capture,
  input  logic [SIG_BITS-1:0] sig_in,
  output logic [SIG_BITS-1:0] sig_q
);

  always_ff @(posedge clk) begin
    if (rst)          sig_q <= '0;
    else if (capture) sig_q <= sig_in;
  end

endmodule
