// bk_adder_top: the Brent-Kung binary adder and the BCD digit adder side
// by side.
//
// The two datapaths are independent and each has its own ports:
//   * a WIDTH-bit Brent-Kung adder (default 16): bk_s = bk_a + bk_b + bk_cin,
//     bk_s[WIDTH] being the carry-out, with the bitwise propagate and
//     generate on bk_p and bk_g;
//   * a one-digit BCD adder, itself made of two 4-bit Brent-Kung adders:
//     bcd_s/bcd_cout = bcd_a + bcd_b + bcd_cin in decimal.
// Purely combinational: results follow the inputs with no clock.
module bk_adder_top #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] bk_a,
  input  logic [WIDTH-1:0] bk_b,
  input  logic             bk_cin,
  output logic [WIDTH:0]   bk_s,
  output logic [WIDTH-1:0] bk_p,
  output logic [WIDTH-1:0] bk_g,

  input  logic [3:0]       bcd_a,
  input  logic [3:0]       bcd_b,
  input  logic             bcd_cin,
  output logic [3:0]       bcd_s,
  output logic             bcd_cout
);

  brent_kung_adder #(.WIDTH(WIDTH)) u_bk (
    .a   (bk_a),
    .b   (bk_b),
    .cin (bk_cin),
    .s   (bk_s),
    .p   (bk_p),
    .g   (bk_g)
  );

  bcd_digit_adder u_bcd (
    .a    (bcd_a),
    .b    (bcd_b),
    .cin  (bcd_cin),
    .s    (bcd_s),
    .cout (bcd_cout)
  );

endmodule
