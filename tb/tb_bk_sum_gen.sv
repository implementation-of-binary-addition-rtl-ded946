// tb_bk_sum_gen: checks the post-processing stage at its default 16 bits.
//
// Random operands are turned into propagate bits and true carries by a
// behavioural addition inside the testbench; the block's sum must then equal
// a + b + cin including the carry-out bit.
module tb_bk_sum_gen;
  localparam int W = 16;

  logic [W-1:0] a, b, p, carry;
  logic         cin;
  logic [W:0]   sum;
  int checks   = 0;
  int failures = 0;

  bk_sum_gen dut (.p(p), .carry(carry), .cin(cin), .sum(sum));

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] partial, exp;
    a = x; b = y; cin = ci;
    p = x ^ y;
    // carry out of bit i: bit i+1 of the sum of the low i+1 bits
    for (int i = 0; i < W; i++) begin
      partial  = (W+1)'(x & ((W'(1) << i) | ((W'(1) << i) - 1)))
               + (W+1)'(y & ((W'(1) << i) | ((W'(1) << i) - 1)))
               + (W+1)'(ci);
      carry[i] = partial[i+1];
    end
    #1;
    exp = (W+1)'(x) + (W+1)'(y) + (W+1)'(ci);
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b sum=%h exp=%h", x, y, ci, sum, exp);
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
    apply(16'h5555, 16'hFFFF, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'h0000, 16'h0000, 1'b1);
    repeat (300) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
