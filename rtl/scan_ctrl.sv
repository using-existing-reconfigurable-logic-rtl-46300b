// scan_ctrl: scan-enable and die-reset generator, and the tester's sequencer.
//
// It runs one complete test of the die under test after reset:
//   1. PH_ASIC_RESET for RST_CYCLES clocks: the die's flip-flops are reset.
//   2. For every pattern: PH_SHIFT for one chain load, then PH_CAPTURE for
//      one clock (scan enable low, the die captures its response). A chain
//      load is SEGMENTS passes of the LUT address generator (CHAIN_LEN clocks
//      each, ended by `lut_last`), with scan enable high and one LUT bit per
//      chain per clock. SEGMENTS is 1 when a chain is as long as a LUT; longer
//      chains unload several LUTs in sequence, each pass with its own select
//      word.
//   3. PH_UNLOAD for one chain load: scan enable high with zeros shifted
//      in, so the response to the last pattern leaves the chains too.
//   4. PH_SIG_WAIT for SIG_WAIT clocks; `sig_capture` is high in the last of
//      them, loading the signature register.
//   5. PH_DONE: `done` stays high until reset.
// Responses of earlier patterns leave the chains while the next pattern is
// shifted in.
//
// Interface: `lut_last` comes from the LUT address generator (last entry of a
// LUT pass), `pat_last` from the RAM address generator (the current select
// word is the last one). `shift` and `unload` are stage-0 signals that enable the LUT
// address generator in the same cycle; `pat_advance` steps the RAM address on
// the last shift clock of every LUT pass; the RAM address generator's
// look-ahead address lets the registered select RAM present the new word in
// the very next clock. `scan_en` and `asic_rst` are
// registered once more, so they reach the die in the same clock as the data
// bits leaving the scan register.
//
// The block is only named in the tester's block diagram. The phase order,
// a single capture clock, the unload phase and the two delay parameters are
// this design's choices. Reset is synchronous, active high.
module scan_ctrl
  import tester_pkg::*;
#(
  parameter int unsigned SEGMENTS   = 1,
  parameter int unsigned RST_CYCLES = 2,
  parameter int unsigned SIG_WAIT   = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic lut_last,
  input  logic pat_last,
  output logic shift,
  output logic unload,
  output logic pat_advance,
  output logic scan_en,
  output logic asic_rst,
  output logic sig_capture,
  output logic done
);

  localparam int unsigned CNT_MAX = (RST_CYCLES > SIG_WAIT) ? RST_CYCLES : SIG_WAIT;
  localparam int unsigned CW      = $clog2(CNT_MAX + 1);
  localparam int unsigned SGW     = (SEGMENTS > 1) ? $clog2(SEGMENTS) : 1;

  if (SEGMENTS < 1) begin : g_bad_segments
    $error("scan_ctrl: SEGMENTS must be at least 1");
  end

  if (SIG_WAIT < 1) begin : g_bad_sig_wait
    $error("scan_ctrl: SIG_WAIT must be at least 1");
  end

  phase_e        phase;
  logic [CW-1:0] cnt;
  logic          final_pat;  // the pattern just loaded was the last one
  logic [SGW-1:0] seg;       // LUT pass within the current chain load
  logic          load_end;   // last clock of a chain load

  assign shift       = (phase == PH_SHIFT);
  assign unload      = (phase == PH_UNLOAD);
  assign pat_advance = shift && lut_last;
  assign sig_capture = (phase == PH_SIG_WAIT) && (32'(cnt) == SIG_WAIT - 1);
  assign done        = (phase == PH_DONE);
  assign load_end    = lut_last && (32'(seg) == SEGMENTS - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= (RST_CYCLES == 0) ? PH_SHIFT : PH_ASIC_RESET;
      cnt       <= '0;
      final_pat <= 1'b0;
      seg       <= '0;
    end else begin
      if (lut_last) seg <= load_end ? '0 : seg + 1'b1;
      unique case (phase)
        PH_ASIC_RESET: begin
          if (32'(cnt) == RST_CYCLES - 1) begin
            cnt   <= '0;
            phase <= PH_SHIFT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_SHIFT: begin
          if (load_end) begin
            final_pat <= pat_last;
            phase     <= PH_CAPTURE;
          end
        end
        PH_CAPTURE: phase <= final_pat ? PH_UNLOAD : PH_SHIFT;
        PH_UNLOAD: begin
          if (load_end) phase <= PH_SIG_WAIT;
        end
        PH_SIG_WAIT: begin
          if (32'(cnt) == SIG_WAIT - 1) begin
            cnt   <= '0;
            phase <= PH_DONE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_DONE: phase <= PH_DONE;
        default: phase <= PH_DONE;
      endcase
    end
  end

  // Outputs to the die, aligned with the scan register.
  always_ff @(posedge clk) begin
    if (rst) begin
      scan_en  <= 1'b0;
      asic_rst <= 1'b0;
    end else begin
      scan_en  <= (phase == PH_SHIFT) || (phase == PH_UNLOAD);
      asic_rst <= (phase == PH_ASIC_RESET);
    end
  end

  // The LUT address generator may report the end of a load only while it
  // is being stepped.
  always @(posedge clk) begin
    if (!rst) a_last_only_when_stepping: assert (!lut_last || shift || unload);
  end

endmodule
