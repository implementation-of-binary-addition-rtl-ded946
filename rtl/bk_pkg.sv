// bk_pkg: types shared by the Brent-Kung adder modules.
//
// A prefix adder moves (propagate, generate) pairs between its stages. The
// pair is kept as one packed struct so that a cell port or a bus element
// carries both signals together. The package also holds the helper that
// gives the number of prefix levels for a width.
package bk_pkg;

  // One (propagate, generate) pair, for a single bit or for a group of bits.
  typedef struct packed {
    logic p;  // group propagates an incoming carry
    logic g;  // group generates a carry by itself
  } pg_t;

  // Number of up-sweep levels of a Brent-Kung tree for WIDTH bits:
  // ceil(log2(WIDTH)), at least 1.
  function automatic int unsigned bk_levels(input int unsigned width);
    int unsigned l;
    l = 0;
    while ((1 << l) < width) l++;
    return (l == 0) ? 1 : l;
  endfunction

endpackage
