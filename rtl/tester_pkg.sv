// tester_pkg: types and helper functions shared by the LUT-based scan tester.
//
// The tester keeps merged ATPG pattern slices in 1-bit-wide LUTs and picks,
// per scan chain and per pattern, one LUT through a multiplexer whose select
// value comes from a small RAM. A chain multiplexer with n data inputs needs
// ceil(log2(n)) select lines (one input needs none). The select fields of all
// chains are packed into one RAM word, chain 0 in the least significant bits,
// which is the S0..S4 order of the worked example with three chains.
//
// The phase encoding of the sequencer is this design's own choice.
package tester_pkg;

  // Sequencer phases (see scan_ctrl).
  typedef enum logic [2:0] {
    PH_ASIC_RESET = 3'd0,  // die flip-flops held in reset
    PH_SHIFT      = 3'd1,  // one pattern shifted into all chains
    PH_CAPTURE    = 3'd2,  // scan enable low for the capture clock
    PH_UNLOAD     = 3'd3,  // last response shifted out, zeros shifted in
    PH_SIG_WAIT   = 3'd4,  // wait for the die's signature to settle
    PH_DONE       = 3'd5   // signature captured and compared
  } phase_e;

  // Select lines a chain multiplexer with n_inputs data inputs needs.
  function automatic int unsigned sel_width(int unsigned n_inputs);
    return (n_inputs <= 1) ? 0 : $clog2(n_inputs);
  endfunction

endpackage
