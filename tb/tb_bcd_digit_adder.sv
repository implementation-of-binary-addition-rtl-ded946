// tb_bcd_digit_adder: exhaustive check of the one-digit BCD adder.
//
// All 200 combinations of two decimal digits and a carry-in are applied.
// The expected digit and decimal carry come from integer division of the
// decimal total by ten. The testbench also counts how often each of the
// three correction conditions (binary carry, sum bits 3 and 2, sum bits 3
// and 1) occurred, and fails if one never did.
module tb_bcd_digit_adder;

  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks   = 0;
  int failures = 0;
  int n_carry = 0, n_y1 = 0, n_y2 = 0, n_none = 0;

  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int c = 0; c < 2; c++) begin
          int total;
          a = 4'(x); b = 4'(y); cin = 1'(c);
          #1;
          total = x + y + c;
          checks++;
          if (int'(s) != total % 10 || int'(cout) != total / 10) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: s=%0d cout=%b", x, y, c, s, cout);
          end
          // which condition of the correction logic fires (binary sum bits)
          if (total >= 16)                      n_carry++;
          else if (total >= 12)                 n_y1++;
          else if (total >= 10)                 n_y2++;
          else                                  n_none++;
        end
    $display("corrections: binary carry %0d, z3&z2 %0d, z3&z1 %0d, none %0d",
             n_carry, n_y1, n_y2, n_none);
    checks++;
    if (n_carry == 0 || n_y1 == 0 || n_y2 == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
