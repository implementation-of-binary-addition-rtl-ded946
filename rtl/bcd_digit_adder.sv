// bcd_digit_adder: one-digit BCD (decimal) adder.
//
// A first 4-bit adder forms the binary sum z = a + b + cin (0..19 for BCD
// inputs) with carry k. The sum is not a valid decimal digit when it is
// above 9, detected as
//   cout = k | (z3 & z2) | (z3 & z1)      (y1 = z3 & z2, y2 = z3 & z1)
// and is then corrected by a second 4-bit adder that adds 0110 (its
// addend is {0, cout, cout, 0} and its carry-in 0); its own carry-out is
// dropped. cout is the decimal carry into the next digit.
//
// The two-adder arrangement and its signal names follow the usual BCD adder
// drawing; building each 4-bit adder as a 4-bit Brent-Kung adder is this
// design's choice. Inputs above 9 are not BCD and give undefined digits.
// Combinational; several digits chain through cin/cout.
module bcd_digit_adder (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  logic [4:0] z_full;   // first adder: {k, z3..z0}
  logic [3:0] z;
  logic       k;
  logic       y1, y2;
  logic [4:0] s_full;   // second adder; its carry-out is not used

  brent_kung_adder #(.WIDTH(4)) u_binary (
    .a   (a),
    .b   (b),
    .cin (cin),
    .s   (z_full),
    .p   (),
    .g   ()
  );

  assign z    = z_full[3:0];
  assign k    = z_full[4];
  assign y1   = z[3] & z[2];
  assign y2   = z[3] & z[1];
  assign cout = k | y1 | y2;

  brent_kung_adder #(.WIDTH(4)) u_correct (
    .a   (z),
    .b   ({1'b0, cout, cout, 1'b0}),
    .cin (1'b0),
    .s   (s_full),
    .p   (),
    .g   ()
  );

  assign s = s_full[3:0];

endmodule
