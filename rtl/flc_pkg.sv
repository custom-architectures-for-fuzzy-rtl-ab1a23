// flc_pkg: helpers shared by the active-rule fuzzy logic controller.
//
// MAX_IN is the length of the per-input MF-count list parameter P_MF; only its
// first N_IN entries are used.
// clog2u is a ceil(log2) that never returns 0, for address widths of tables
// that may have a single entry.
package flc_pkg;

  localparam int unsigned MAX_IN = 4;  // size of the MF-count list parameter

  function automatic int unsigned clog2u(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
