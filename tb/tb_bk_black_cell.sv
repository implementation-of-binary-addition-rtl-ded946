// tb_bk_black_cell: exhaustive check of the black prefix cell.
//
// Drives all 16 combinations of the two (P,G) pairs and compares the merged
// pair with the group rule worked out here: the merged group propagates if
// both halves do, and generates if the upper half generates or propagates
// a carry generated by the lower half.
module tb_bk_black_cell;
  import bk_pkg::*;

  pg_t hi, lo, out;
  int  checks   = 0;
  int  failures = 0;

  bk_black_cell dut (.hi(hi), .lo(lo), .out(out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_p, exp_g;
      {hi.p, hi.g, lo.p, lo.g} = 4'(v);
      #1;
      exp_p = (hi.p == 1'b1) && (lo.p == 1'b1);
      exp_g = (hi.g == 1'b1) || ((hi.p == 1'b1) && (lo.g == 1'b1));
      checks++;
      if (out.p !== exp_p || out.g !== exp_g) begin
        failures++;
        $display("FAIL hi=%b%b lo=%b%b out=%b%b exp=%b%b",
                 hi.p, hi.g, lo.p, lo.g, out.p, out.g, exp_p, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
