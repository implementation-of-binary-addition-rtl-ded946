// tb_bk_pg_gen: checks the pre-processing stage at its default 16 bits.
//
// Applies the operand pair of the reference simulation (0x5555, 0xFFFF),
// all-zero and all-one operands and random pairs, and compares every bit's
// propagate and generate with the half-adder truth table.
module tb_bk_pg_gen;
  import bk_pkg::*;

  localparam int W = 16;

  logic [W-1:0] a, b;
  pg_t  [W-1:0] pg;
  int checks   = 0;
  int failures = 0;

  bk_pg_gen dut (.a(a), .b(b), .pg(pg));

  task automatic check();
    #1;
    for (int i = 0; i < W; i++) begin
      // half adder: sum bit is propagate, carry bit is generate
      logic [1:0] ha;
      ha = 2'(a[i]) + 2'(b[i]);
      checks++;
      if (pg[i].p !== ha[0] || pg[i].g !== ha[1]) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h p=%b g=%b", i, a, b, pg[i].p, pg[i].g);
      end
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'h5555; b = 16'hFFFF; check();
    a = '0;       b = '0;       check();
    a = '1;       b = '1;       check();
    repeat (200) begin
      a = W'($urandom);
      b = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
