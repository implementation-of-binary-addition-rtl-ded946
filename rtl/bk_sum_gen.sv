// bk_sum_gen: post-processing stage of the prefix adder.
//
// Forms each sum bit from its propagate and the carry into it:
//   S_i = P_i xor C_(i-1),  C_(-1) = cin
// and puts the carry out of the top bit above the sum, so `sum` is
// WIDTH+1 bits wide. The carries arrive finished from the carry network
// (carry[i] is the carry out of bit i, the carry-in already included).
// Combinational.
module bk_sum_gen #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] carry,
  input  logic             cin,
  output logic [WIDTH:0]   sum
);

  logic [WIDTH-1:0] carry_into;

  // Carry into bit i is the carry out of bit i-1; the carry-in feeds bit 0.
  if (WIDTH > 1) begin : g_wide
    assign carry_into = {carry[WIDTH-2:0], cin};
  end else begin : g_one
    assign carry_into = cin;
  end
  assign sum        = {carry[WIDTH-1], p ^ carry_into};

endmodule
