// qca_arith_pkg: constants and latency formulas shared by the MAJ_5-based
// arithmetic units (full adder, ripple carry adder, subtractor, pipelined
// array multiplier).
//
// Timing model: one clock of this RTL stands for one QCA clock cycle (four
// clock phases). The full adder takes two such cycles, the figure given for
// the MAJ_5 full adder layout; every other latency below is derived from it.
package qca_arith_pkg;

  // Full adder delay in clock cycles.
  localparam int unsigned FA_LAT_DEFAULT = 2;

  // Ripple carry adder: each bit position adds one full adder delay.
  function automatic int unsigned rca_latency(int unsigned width, int unsigned fa_lat);
    return width * fa_lat;
  endfunction

  // Array multiplier with row 0 made of AND gates only and rows 1..n-1 made
  // of cells: the longest path runs through 3n-4 cells (n >= 2).
  function automatic int unsigned mult_latency(int unsigned n, int unsigned fa_lat);
    return (3 * n - 4) * fa_lat;
  endfunction

endpackage
