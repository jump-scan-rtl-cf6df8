// jscan_pkg: constants and helpers shared by the jump-scan chains and top.
//
// A jump-scan chain moves two bits per clock cycle, one through each latch
// of a cell, so it must hold an even number of cells. A circuit with an odd
// number of flip-flops gets one extra (dummy) cell at the scan-in end of the
// chain; num_cells() gives the resulting chain length and pad_cells() the
// number of dummy cells (0 or 1).
package jscan_pkg;

  function automatic int unsigned pad_cells(int unsigned n_ff);
    return n_ff % 2;
  endfunction

  function automatic int unsigned num_cells(int unsigned n_ff);
    return n_ff + pad_cells(n_ff);
  endfunction

endpackage
