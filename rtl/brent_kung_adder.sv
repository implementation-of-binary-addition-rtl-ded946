// brent_kung_adder: WIDTH-bit Brent-Kung parallel prefix adder.
//
// Adds a + b + cin in the three stages of a prefix adder:
//   1. pre-processing (bk_pg_gen): P_i = a_i ^ b_i, G_i = a_i & b_i;
//   2. carry generation (bk_carry_network): Brent-Kung tree of black and
//      gray cells giving the carry out of every bit;
//   3. post-processing (bk_sum_gen): S_i = P_i ^ C_(i-1).
// The carry-in is merged into bit 0 by one gray cell before the tree
// (G0' = G0 | P0 & cin), so every prefix the tree forms already includes it.
// That placement of the carry-in is this design's choice; it gives the same
// carries as adding the (P[i:0] & cin) term after the tree.
//
// Ports: s is WIDTH+1 bits, the carry-out on top; p and g are the bitwise
// propagate and generate, brought out for observation. The default WIDTH
// is 16; 32 is the wider version. Purely combinational, no clock or reset;
// the carry path is 1 + 2*ceil(log2(WIDTH)) - 1 cells deep.
module brent_kung_adder
  import bk_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH:0]   s,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);

  pg_t  [WIDTH-1:0] pg_bit;    // per-bit pairs from pre-processing
  pg_t  [WIDTH-1:0] pg_tree;   // same, bit 0 with the carry-in merged
  logic [WIDTH-1:0] carry;     // carry out of each bit
  logic             g0_cin;    // generate of bits 0..-1 (bit 0 and cin)

  bk_pg_gen #(.WIDTH(WIDTH)) u_pre (
    .a  (a),
    .b  (b),
    .pg (pg_bit)
  );

  bk_gray_cell u_cin (
    .hi    (pg_bit[0]),
    .g_lo  (cin),
    .g_out (g0_cin)
  );

  always_comb begin
    pg_tree    = pg_bit;
    pg_tree[0] = '{p: 1'b0, g: g0_cin};
  end

  bk_carry_network #(.WIDTH(WIDTH)) u_tree (
    .pg    (pg_tree),
    .carry (carry)
  );

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      p[i] = pg_bit[i].p;
      g[i] = pg_bit[i].g;
    end
  end

  bk_sum_gen #(.WIDTH(WIDTH)) u_post (
    .p     (p),
    .carry (carry),
    .cin   (cin),
    .sum   (s)
  );

endmodule
