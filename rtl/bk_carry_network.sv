// bk_carry_network: Brent-Kung carry generation network.
//
// Takes the per-bit (P,G) pairs, bit 0's generate already holding the
// carry-in, and returns carry[i] = G[i:0], the carry out of every bit.
//
// The tree has 2L-1 stages for L = ceil(log2(WIDTH)):
//   * up-sweep, level l = 1..L: bit k*2^l-1 merges with bit k*2^l-2^(l-1)-1
//     (k >= 1), doubling the span of every second group. This yields the
//     group pairs 15:14, 13:12, ... then 15:12, 11:8, ... then 15:8 and
//     finally 15:0 for 16 bits.
//   * down-sweep, level l = L-1..1: bit k*2^l+2^(l-1)-1 (k >= 1) merges with
//     the already finished prefix at bit k*2^l-1, giving 11:0, then 13:0,
//     9:0, 5:0, then all even-span prefixes 14:0, 12:0, ... 2:0.
// A merge whose result reaches bit 0 is a gray cell (generate only), every
// other merge a black cell (propagate and generate). Bits without a cell in
// a stage are carried to the next stage unchanged, which is the job of the
// buffers in the classic drawing of this tree. A group that reaches bit 0
// has nothing left to propagate, so its propagate is driven 0.
//
// The placement of the cells is the standard Brent-Kung one; the general
// rule for any WIDTH (not only powers of two) is this design's own.
// Combinational; logic depth 2L-1 cells, WIDTH defaults to 16.
module bk_carry_network
  import bk_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  pg_t  [WIDTH-1:0] pg,
  output logic [WIDTH-1:0] carry
);

  localparam int unsigned L       = bk_levels(WIDTH);
  localparam int unsigned NSTAGES = 2 * L - 1;

  // stage[0] is the input; stage[s] is the output of stage s.
  pg_t [WIDTH-1:0] stage [NSTAGES+1];

  assign stage[0] = pg;

  for (genvar s = 1; s <= NSTAGES; s++) begin : g_stage
    // Up-sweep for s <= L (level l = s), down-sweep after it (l = 2L - s).
    localparam bit          UP   = (s <= L);
    localparam int unsigned LVL  = UP ? s : 2 * L - s;
    localparam int unsigned SPAN = 1 << LVL;        // 2^l
    localparam int unsigned HALF = 1 << (LVL - 1);  // 2^(l-1)

    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      localparam bit IS_CELL = UP ? (((i + 1) % SPAN) == 0)
                                  : ((i >= SPAN) && (((i + 1) % SPAN) == HALF));
      // Up-sweep cells reaching bit 0 and all down-sweep cells are gray.
      localparam bit IS_GRAY = UP ? ((i + 1) == SPAN) : 1'b1;

      if (IS_CELL && IS_GRAY) begin : g_gray
        logic g_merged;
        bk_gray_cell u_cell (
          .hi    (stage[s-1][i]),
          .g_lo  (stage[s-1][i-HALF].g),
          .g_out (g_merged)
        );
        assign stage[s][i] = '{p: 1'b0, g: g_merged};
      end else if (IS_CELL) begin : g_black
        bk_black_cell u_cell (
          .hi  (stage[s-1][i]),
          .lo  (stage[s-1][i-HALF]),
          .out (stage[s][i])
        );
      end else begin : g_wire
        assign stage[s][i] = stage[s-1][i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < WIDTH; i++) carry[i] = stage[NSTAGES][i].g;
  end

endmodule
