// bk_black_cell: black prefix cell of a parallel prefix adder.
//
// Merges two adjacent bit groups. With (P,G) of the more significant group
// on `hi` and of the adjacent less significant group on `lo`, it gives the
// pair of their union:
//   out.p = hi.p & lo.p            (one AND)
//   out.g = hi.g | (hi.p & lo.g)   (one AND, one OR)
// These are the usual black-cell equations of a prefix adder: two AND
// gates and one OR gate. Purely combinational, no clock.
module bk_black_cell
  import bk_pkg::*;
(
  input  pg_t hi,
  input  pg_t lo,
  output pg_t out
);

  always_comb begin
    out.p = hi.p & lo.p;
    out.g = hi.g | (hi.p & lo.g);
  end

endmodule
