// scan_ctrl_check: drives one scan_ctrl instance for tb_scan_ctrl.
//
// Reference counters play the LUT address generator (L entries per pass) and
// the RAM address generator (P*SEG select words). Every stage-0 output is
// compared with the expected phase plan, scan_en/asic_rst with the same plan
// one clock later, and the test must end after RSTC + P*(SEG*L+1) + SEG*L +
// SWAIT clocks. The test is run twice, through reset.
module scan_ctrl_check #(
  parameter int L = 5,
  parameter int P = 4,
  parameter int SEG = 1,
  parameter int RSTC = 2,
  parameter int SWAIT = 2
) (
  input  logic clk,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int LOAD = SEG * L;
  localparam int T_DONE = RSTC + P*(LOAD+1) + LOAD + SWAIT;
  logic rst;
  logic lut_last, pat_last;
  logic shift, unload, pat_advance, scan_en, asic_rst, sig_capture, done;
  int lut_cnt, word_cnt, n_cap;
  logic prev_en, prev_rst;

  scan_ctrl #(.SEGMENTS(SEG), .RST_CYCLES(RSTC), .SIG_WAIT(SWAIT)) dut (
    .clk, .rst, .lut_last, .pat_last, .shift, .unload, .pat_advance,
    .scan_en, .asic_rst, .sig_capture, .done);

  assign lut_last = (shift || unload) && lut_cnt == L - 1;
  assign pat_last = word_cnt == P*SEG - 1;

  always @(posedge clk) begin
    if (rst) begin
      lut_cnt <= 0; word_cnt <= 0;
    end else begin
      if (shift || unload) lut_cnt <= (lut_cnt == L - 1) ? 0 : lut_cnt + 1;
      if (pat_advance) word_cnt <= (word_cnt == P*SEG - 1) ? 0 : word_cnt + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t SEG=%0d %s", $time, SEG, what); end
  endtask

  task automatic run_once();
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    prev_en = 0; prev_rst = 0;
    for (int j = 0; j < T_DONE + 4; j++) begin
      bit e_shift, e_unload, e_adv, e_cap, e_done, e_rst;
      e_shift = 0; e_unload = 0; e_adv = 0; e_cap = 0; e_done = 0; e_rst = 0;
      if (j < RSTC) e_rst = 1;
      else if (j < RSTC + P*(LOAD+1)) begin
        int b;
        b = (j - RSTC) % (LOAD+1);
        e_shift = (b < LOAD);
        e_adv = (b < LOAD) && (b % L == L - 1);
      end else if (j < RSTC + P*(LOAD+1) + LOAD) e_unload = 1;
      else if (j < T_DONE) e_cap = (j == T_DONE - 1);
      else e_done = 1;
      #1;
      check(shift == e_shift && unload == e_unload && pat_advance == e_adv,
            $sformatf("cycle %0d: shift %b unload %b advance %b", j, shift, unload, pat_advance));
      check(sig_capture == e_cap && done == e_done, $sformatf("cycle %0d: capture %b done %b", j, sig_capture, done));
      if (j > 0) check(scan_en == prev_en && asic_rst == prev_rst, $sformatf("cycle %0d: registered outputs", j));
      n_cap += sig_capture;
      prev_en = e_shift || e_unload;
      prev_rst = e_rst;
      @(posedge clk);
    end
  endtask

  initial begin
    rst = 1; finished = 0; checks = 0; failures = 0; n_cap = 0;
    wait (start);
    run_once();
    run_once();
    check(n_cap == 2, "one signature capture per test");
    finished = 1;
  end
endmodule
