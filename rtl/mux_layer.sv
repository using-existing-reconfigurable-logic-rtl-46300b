// mux_layer: one multiplexer per scan chain.
//
// Chain c has a multiplexer with MUX_INPUTS[c] data inputs; data input j is
// wired to LUT MUX_MAP[c*MAX_IN + j]. The chain's field of the select word picks the
// input, and the chosen LUT bit becomes the chain's next scan-in bit. A LUT
// may be wired to several chains (fan-out) and a chain may select the same
// input for several patterns; this sharing is what the pattern merging buys.
//
// Select layout: chain c uses sel_width(MUX_INPUTS[c]) = ceil(log2) bits,
// starting right after the bits of chains 0..c-1, so chain 0 is in the least
// significant bits (S1 S0 for chain 1 of the worked example, S2 for chain 2,
// S4 S3 for chain 3). A select value past the last wired input yields 0.
// SEL_BITS must equal the sum of the field widths; an elaboration check
// enforces it. Purely combinational.
//
// Defaults are the worked example: chain 1 (index 0) reads LUT0, LUT1, LUT2
// on inputs 00, 01, 10; chain 2 reads LUT2 on input 0 and LUT3 on input 1;
// chain 3 reads LUT3, LUT0, LUT1 on inputs 00, 01, 10.
module mux_layer
  import tester_pkg::*;
#(
  parameter int unsigned N_LUTS   = 4,
  parameter int unsigned N_CHAINS = 3,
  parameter int unsigned MAX_IN   = 4,
  parameter int unsigned SEL_BITS = 5,
  parameter int unsigned MUX_INPUTS [N_CHAINS] = '{3, 2, 3},
  parameter int unsigned MUX_MAP [N_CHAINS*MAX_IN] = '{0, 1, 2, 0,  2, 3, 0, 0,  3, 0, 1, 0}
) (
  input  logic [N_LUTS-1:0]   lut_in,
  input  logic [SEL_BITS-1:0] sel,
  output logic [N_CHAINS-1:0] chain_bits
);

  // First select bit of chain c.
  function automatic int unsigned sel_offset(int unsigned c);
    int unsigned off = 0;
    for (int unsigned k = 0; k < c; k++) off += sel_width(MUX_INPUTS[k]);
    return off;
  endfunction

  localparam int unsigned TOTAL_SEL = sel_offset(N_CHAINS);

  if (TOTAL_SEL != SEL_BITS) begin : g_bad_sel_bits
    $error("mux_layer: SEL_BITS (%0d) must equal the summed select widths (%0d)", SEL_BITS, TOTAL_SEL);
  end

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_chain
    localparam int unsigned NIN = MUX_INPUTS[c];
    localparam int unsigned SW  = sel_width(NIN);
    localparam int unsigned OFF = sel_offset(c);

    if (NIN < 1 || NIN > MAX_IN) begin : g_bad_inputs
      $error("mux_layer: chain %0d has %0d inputs, allowed 1..%0d", c, NIN, MAX_IN);
    end

    // The data inputs of this chain's multiplexer.
    logic [MAX_IN-1:0] data;
    for (genvar j = 0; j < MAX_IN; j++) begin : g_in
      if (j < NIN) begin : g_used
        assign data[j] = lut_in[MUX_MAP[c*MAX_IN + j]];
      end else begin : g_unused
        assign data[j] = 1'b0;
      end
    end

    if (SW == 0) begin : g_single
      assign chain_bits[c] = data[0];
    end else begin : g_mux
      logic [SW-1:0] s;
      assign s = sel[OFF +: SW];
      always_comb begin
        chain_bits[c] = 1'b0;
        for (int j = 0; j < NIN; j++)
          if (32'(s) == j) chain_bits[c] = data[j];
      end
    end
  end

endmodule
