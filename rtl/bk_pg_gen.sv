// bk_pg_gen: pre-processing stage of the prefix adder.
//
// For every operand bit it forms the propagate P_i = A_i xor B_i and the
// generate G_i = A_i and B_i. Combinational; WIDTH defaults to 16 bits.
module bk_pg_gen
  import bk_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output pg_t  [WIDTH-1:0] pg
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      pg[i].p = a[i] ^ b[i];
      pg[i].g = a[i] & b[i];
    end
  end

endmodule
