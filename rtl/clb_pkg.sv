// clb_pkg: shared sizes and the local-routing select encoding of the
// pattern-based logic block.
//
// The default sizes are the evaluated architecture: 6-input LUTs (K), seven
// BLEs per logic block (N), and I = K*(N+1)/2 = 24 logic-block inputs.
//
// Every LUT input of the block is driven by one local-routing multiplexer,
// configured by a binary select code. The code space is this design's own
// choice (the encoding of routing configuration is not specified):
//   0 .. I-1        logic-block input IPIN[code]
//   I .. I+N-1      BLE output OPIN[code-I] fed back into the block
//   I+N             pattern shortcut: combinational output of LUT i, on
//                   input i of LUT j, allowed only for i < j
//   anything else   constant 0 (input unused)
package clb_pkg;

  localparam int unsigned K_DEF = 6;
  localparam int unsigned N_DEF = 7;
  localparam int unsigned I_DEF = K_DEF * (N_DEF + 1) / 2;

  // Width of one local-routing select code for a block of I inputs and N BLEs.
  function automatic int unsigned sel_width(int unsigned i_pins, int unsigned n_bles);
    return $clog2(i_pins + n_bles + 1);
  endfunction

  // Select code of the pattern shortcut for a block of I inputs and N BLEs.
  function automatic int unsigned shortcut_code(int unsigned i_pins, int unsigned n_bles);
    return i_pins + n_bles;
  endfunction

  // Number of shortcut multiplexer inputs a pattern-X adds: X(X-1)/2.
  function automatic int unsigned num_shortcuts(int unsigned x);
    return x * (x - 1) / 2;
  endfunction

endpackage
