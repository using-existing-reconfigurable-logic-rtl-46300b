// sig_checker: golden-signature comparison.
//
// The registered signature is compared bit by bit with the stored golden
// signature (an XNOR per bit, all results ANDed), giving the tester's pass
// output. `pass` is additionally qualified by `valid`, so it is only high once
// the signature register holds the final signature; that qualification is
// this design's choice. GOLDEN is fixed at configuration time, like the
// pattern data. Combinational.
module sig_checker #(
  parameter int unsigned SIG_BITS = 32,
  parameter logic [SIG_BITS-1:0] GOLDEN = '0
) (
  input  logic [SIG_BITS-1:0] sig,
  input  logic                valid,
  output logic                pass
);

  logic [SIG_BITS-1:0] bit_equal;

  assign bit_equal = sig ~^ GOLDEN;
  assign pass      = valid && (&bit_equal);

endmodule
