// asic_model: behavioural model of the die under test, for testbenches only.
//
// N_CHAINS scan chains of CHAIN_LEN flip-flops each. On a rising clock edge:
//   rst high             : all flip-flops and the MISR clear to 0.
//   scan_en high (shift) : every chain shifts by one; scan_in[c] enters
//                          position 0, position CHAIN_LEN-1 leaves as
//                          scan-out, and the MISR absorbs the scan-out bits.
//   scan_en low (capture): every flip-flop loads a fixed function of the
//                          chain contents, standing in for the die's logic:
//                          f[c][i] = s[c][i] ^ (s[c+1][i] & s[c][i+1]) ^ s[c-1][i-1]
//                          (indices wrap around).
// The MISR is a Galois LFSR with polynomial POLY; scan-out bit c is XORed into
// MISR bit c mod SIG_BITS. `sig` is the MISR state. `toggles` counts the
// flip-flop transitions caused by shifting, the scan-shift switching measure.
module asic_model #(
  parameter int unsigned N_CHAINS  = 3,
  parameter int unsigned CHAIN_LEN = 5,
  parameter int unsigned SIG_BITS  = 32,
  parameter logic [SIG_BITS-1:0] POLY = SIG_BITS'(32'h04C1_1DB7)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                scan_en,
  input  logic [N_CHAINS-1:0] scan_in,
  output logic [SIG_BITS-1:0] sig,
  output longint unsigned     toggles
);

  logic [CHAIN_LEN-1:0] s [N_CHAINS];

  function automatic logic [SIG_BITS-1:0] misr_step(logic [SIG_BITS-1:0] m, logic [N_CHAINS-1:0] so);
    logic [SIG_BITS-1:0] nm;
    nm = {m[SIG_BITS-2:0], 1'b0} ^ (m[SIG_BITS-1] ? POLY : '0);
    for (int c = 0; c < N_CHAINS; c++) nm[c % SIG_BITS] ^= so[c];
    return nm;
  endfunction

  always @(posedge clk) begin
    logic [N_CHAINS-1:0]  so;
    logic [CHAIN_LEN-1:0] ns [N_CHAINS];
    if (rst) begin
      for (int c = 0; c < N_CHAINS; c++) s[c] <= '0;
      sig     <= '0;
      toggles <= 0;
    end else if (scan_en) begin
      automatic longint unsigned t = 0;
      for (int c = 0; c < N_CHAINS; c++) begin
        so[c] = s[c][CHAIN_LEN-1];
        ns[c] = {s[c][CHAIN_LEN-2:0], scan_in[c]};
        t += $countones(ns[c] ^ s[c]);
        s[c] <= ns[c];
      end
      sig     <= misr_step(sig, so);
      toggles <= toggles + t;
    end else begin
      for (int c = 0; c < N_CHAINS; c++)
        for (int i = 0; i < CHAIN_LEN; i++)
          ns[c][i] = s[c][i]
                   ^ (s[(c + 1) % N_CHAINS][i] & s[c][(i + 1) % CHAIN_LEN])
                   ^ s[(c + N_CHAINS - 1) % N_CHAINS][(i + CHAIN_LEN - 1) % CHAIN_LEN];
      for (int c = 0; c < N_CHAINS; c++) s[c] <= ns[c];
    end
  end

endmodule
