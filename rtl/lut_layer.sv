// lut_layer: the pool of pattern LUTs.
//
// Each LUT stores one merged pattern slice of CHAIN_LEN bits (a 5-input LUT
// stores 32). After merging, one LUT can serve several patterns of one chain
// and several chains, so the pool is usually far smaller than the number of
// (chain, pattern) pairs. All LUTs are read at the same address and together
// present one bit each on `lut_out`; the read is combinational, as a LUT is.
//
// Contents: LUT_INIT[k][i] is bit i of LUT k, the i-th bit shifted out.
// The defaults are the four LUT words of the three-chain worked example,
// written there as strings whose leftmost character is address 0:
// LUT0 = 01111, LUT1 = 10000, LUT2 = 10110, LUT3 = 11001. The contents are
// fixed at elaboration, as FPGA LUT contents are fixed by configuration.
module lut_layer #(
  parameter int unsigned N_LUTS    = 4,
  parameter int unsigned CHAIN_LEN = 5,
  parameter logic [N_LUTS-1:0][CHAIN_LEN-1:0] LUT_INIT = {5'b10011, 5'b01101, 5'b00001, 5'b11110},
  localparam int unsigned AW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1
) (
  input  logic [AW-1:0]     addr,
  output logic [N_LUTS-1:0] lut_out
);

  for (genvar k = 0; k < N_LUTS; k++) begin : g_lut
    localparam logic [CHAIN_LEN-1:0] WORD = LUT_INIT[k];
    // Addresses past CHAIN_LEN-1 are never issued; they read 0.
    assign lut_out[k] = (32'(addr) < CHAIN_LEN) ? WORD[addr] : 1'b0;
  end

endmodule
