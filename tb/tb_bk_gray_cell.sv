// tb_bk_gray_cell: exhaustive check of the gray prefix cell.
//
// Drives all 8 combinations of the upper (P,G) pair and the lower generate
// and compares the output with: carry out of the merged group = upper
// generates, or upper propagates and lower generates.
module tb_bk_gray_cell;
  import bk_pkg::*;

  pg_t  hi;
  logic g_lo, g_out;
  int   checks   = 0;
  int   failures = 0;

  bk_gray_cell dut (.hi(hi), .g_lo(g_lo), .g_out(g_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {hi.p, hi.g, g_lo} = 3'(v);
      #1;
      exp_g = (hi.g == 1'b1) || ((hi.p == 1'b1) && (g_lo == 1'b1));
      checks++;
      if (g_out !== exp_g) begin
        failures++;
        $display("FAIL hi=%b%b g_lo=%b g_out=%b exp=%b",
                 hi.p, hi.g, g_lo, g_out, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
