// bk_gray_cell: gray prefix cell of a parallel prefix adder.
//
// Used where the merged group reaches bit 0 (or the carry-in), so only its
// generate is needed: that generate is already the final carry.
//   g_out = hi.g | (hi.p & g_lo)   (one AND, one OR)
// `hi` is the (P,G) pair of the more significant group, `g_lo` the
// generate of the adjacent less significant group. Combinational.
module bk_gray_cell
  import bk_pkg::*;
(
  input  pg_t  hi,
  input  logic g_lo,
  output logic g_out
);

  assign g_out = hi.g | (hi.p & g_lo);

endmodule
