// tb_bk_adder_top: end-to-end test of the top at its default parameters.
//
// The 16-bit Brent-Kung adder gets the reference vector (0x5555 + 0xFFFF,
// cin 0 -> 0x15554), carry chains that run through every bit, and random
// operands; results are compared with the simulator's own addition. The BCD
// digit adder gets every pair of decimal digits with both carry-ins, and
// then multi-digit decimal additions done digit by digit through the same
// adder, checked against integer arithmetic.
//
// Mechanisms counted, each of which must occur at least once: carry-in
// used, carry-out produced, a carry propagated across all 16 bits, a BCD
// result needing no correction, and each of the three correction
// conditions (binary carry, sum bits 3&2, sum bits 3&1).
module tb_bk_adder_top;

  localparam int W = 16;

  logic [W-1:0] bk_a, bk_b, bk_p, bk_g;
  logic         bk_cin;
  logic [W:0]   bk_s;
  logic [3:0]   bcd_a, bcd_b, bcd_s;
  logic         bcd_cin, bcd_cout;

  int checks   = 0;
  int failures = 0;
  int n_cin = 0, n_cout = 0, n_full_chain = 0;
  int n_bcd_none = 0, n_bcd_carry = 0, n_bcd_y1 = 0, n_bcd_y2 = 0;

  bk_adder_top dut (
    .bk_a, .bk_b, .bk_cin, .bk_s, .bk_p, .bk_g,
    .bcd_a, .bcd_b, .bcd_cin, .bcd_s, .bcd_cout
  );

  task automatic bk_add(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] exp;
    bk_a = x; bk_b = y; bk_cin = ci;
    #1;
    exp = (W+1)'(x) + (W+1)'(y) + (W+1)'(ci);
    checks++;
    if (bk_s !== exp || bk_p !== (x ^ y) || bk_g !== (x & y)) begin
      failures++;
      $display("FAIL bk %h+%h+%b: s=%h p=%h g=%h exp s=%h", x, y, ci, bk_s, bk_p, bk_g, exp);
    end
    if (ci) n_cin++;
    if (exp[W]) n_cout++;
    if ((x ^ y) == '1 && ci) n_full_chain++;
  endtask

  // one decimal digit through the BCD adder; returns {carry, digit}
  task automatic bcd_add(input int x, input int y, input int c, output int digit, output int carry);
    int total;
    bcd_a = 4'(x); bcd_b = 4'(y); bcd_cin = 1'(c);
    #1;
    total = x + y + c;
    checks++;
    if (int'(bcd_s) != total % 10 || int'(bcd_cout) != total / 10) begin
      failures++;
      $display("FAIL bcd %0d+%0d+%0d: s=%0d cout=%b", x, y, c, bcd_s, bcd_cout);
    end
    if (total >= 16)      n_bcd_carry++;
    else if (total >= 12) n_bcd_y1++;
    else if (total >= 10) n_bcd_y2++;
    else                  n_bcd_none++;
    digit = int'(bcd_s);
    carry = int'(bcd_cout);
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, c;
    bcd_a = '0; bcd_b = '0; bcd_cin = 1'b0;

    // Brent-Kung adder
    bk_add(16'h5555, 16'hFFFF, 1'b0);
    checks++;
    if (bk_s !== 17'h1_5554) begin
      failures++;
      $display("FAIL reference vector s=%h", bk_s);
    end
    bk_add(16'hFFFF, 16'h0000, 1'b1);   // carry-in ripples through all bits
    bk_add(16'hAAAA, 16'h5555, 1'b1);
    for (int k = 0; k < W; k++) bk_add(16'hFFFF, W'(1) << k, 1'b0);
    repeat (5000) bk_add(W'($urandom), W'($urandom), 1'($urandom));

    // BCD digit adder: every digit pair
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int ci = 0; ci < 2; ci++) bcd_add(x, y, ci, d, c);

    // multi-digit decimal additions, four digits, carry passed digit to digit
    repeat (500) begin
      int x, y, got, place;
      x = int'($urandom % 10000);
      y = int'($urandom % 10000);
      c = 0; got = 0; place = 1;
      for (int i = 0; i < 4; i++) begin
        bcd_add((x / place) % 10, (y / place) % 10, c, d, c);
        got += d * place;
        place *= 10;
      end
      got += c * place;
      checks++;
      if (got != x + y) begin
        failures++;
        $display("FAIL decimal %0d + %0d = %0d", x, y, got);
      end
    end

    $display("mechanisms: cin %0d, cout %0d, full carry chain %0d",
             n_cin, n_cout, n_full_chain);
    $display("bcd: no correction %0d, binary carry %0d, z3&z2 %0d, z3&z1 %0d",
             n_bcd_none, n_bcd_carry, n_bcd_y1, n_bcd_y2);
    checks++;
    if (n_cin == 0 || n_cout == 0 || n_full_chain == 0 || n_bcd_none == 0 ||
        n_bcd_carry == 0 || n_bcd_y1 == 0 || n_bcd_y2 == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
