// tb_brent_kung_adder: checks the complete Brent-Kung adder.
//
// Instances: the default 16 bits, the 32-bit version, and 4-, 7- and 1-bit
// ones (a non-power-of-two width and the degenerate one). The reference is
// the simulator's own addition a + b + cin. The 16-bit reference vector
// 0x5555 + 0xFFFF (cin 0) must give 0x15554 with p = 0xAAAA, g = 0x5555
// and a carry out of every bit.
// The 4- and 7-bit adders are checked exhaustively, the wide ones with
// corner cases and random operands.
module tb_brent_kung_adder;

  logic [31:0] a, b;
  logic        cin;
  logic [16:0] s16;  logic [15:0] p16, g16;
  logic [32:0] s32;  logic [31:0] p32, g32;
  logic [4:0]  s4;   logic [3:0]  p4,  g4;
  logic [7:0]  s7;   logic [6:0]  p7,  g7;
  logic [1:0]  s1;   logic [0:0]  p1,  g1;
  int checks   = 0;
  int failures = 0;

  brent_kung_adder               dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16), .p(p16), .g(g16));
  brent_kung_adder #(.WIDTH(32)) dut32 (.a(a),       .b(b),       .cin(cin), .s(s32), .p(p32), .g(g32));
  brent_kung_adder #(.WIDTH(4))  dut4  (.a(a[3:0]),  .b(b[3:0]),  .cin(cin), .s(s4),  .p(p4),  .g(g4));
  brent_kung_adder #(.WIDTH(7))  dut7  (.a(a[6:0]),  .b(b[6:0]),  .cin(cin), .s(s7),  .p(p7),  .g(g7));
  brent_kung_adder #(.WIDTH(1))  dut1  (.a(a[0:0]),  .b(b[0:0]),  .cin(cin), .s(s1),  .p(p1),  .g(g1));

  task automatic expect_eq(input string what, input logic [32:0] got, input logic [32:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b got=%h exp=%h", what, a, b, cin, got, exp);
    end
  endtask

  task automatic check_all();
    #1;
    expect_eq("s16", 33'(s16), 33'(a[15:0]) + 33'(b[15:0]) + 33'(cin));
    expect_eq("p16", 33'(p16), 33'(a[15:0] ^ b[15:0]));
    expect_eq("g16", 33'(g16), 33'(a[15:0] & b[15:0]));
    expect_eq("s32", s32,      33'(a) + 33'(b) + 33'(cin));
    expect_eq("s4",  33'(s4),  33'(a[3:0]) + 33'(b[3:0]) + 33'(cin));
    expect_eq("s7",  33'(s7),  33'(a[6:0]) + 33'(b[6:0]) + 33'(cin));
    expect_eq("s1",  33'(s1),  33'(a[0]) + 33'(b[0]) + 33'(cin));
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference vector: a = 0101...01, b = 1111...11, cin = 0
    a = 32'h0000_5555; b = 32'h0000_FFFF; cin = 1'b0;
    #1;
    expect_eq("ref s",  33'(s16), 33'h1_5554);
    expect_eq("ref p",  33'(p16), 33'h0_AAAA);
    expect_eq("ref g",  33'(g16), 33'h0_5555);
    // every bit carries out for this vector
    expect_eq("ref c",  33'(dut16.carry), 33'h0_FFFF);
    // exhaustive over 7 bits (covers the 4- and 1-bit adders too)
    for (int v = 0; v < (1 << 15); v++) begin
      a   = 32'(v[6:0]) | 32'h5A5A_0000;
      b   = 32'(v[13:7]);
      cin = v[14];
      check_all();
    end
    // carry rippling through every position of the wide adders
    for (int k = 0; k < 33; k++) begin
      a = (k == 32) ? 32'hFFFF_FFFF : ((32'h1 << k) - 1);
      b = 32'h0; cin = 1'b1; check_all();
      a = 32'hFFFF_FFFF; b = 32'h1 << (k % 32); cin = 1'b0; check_all();
    end
    repeat (3000) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
