// tb_bk_carry_network: checks the Brent-Kung carry tree.
//
// The default 16-bit network and 32-, 9- and 5-bit ones are driven with the
// same random (P,G) vectors (P and G never both 1, as from real operands).
// Each carry is compared with a serial reference: c = g_i | (p_i & c),
// scanned from bit 0 upwards. Long propagate runs are forced so that carries
// must cross the full width.
module tb_bk_carry_network;
  import bk_pkg::*;

  pg_t  [31:0] pg;
  logic [15:0] c16;
  logic [31:0] c32;
  logic [8:0]  c9;
  logic [4:0]  c5;
  int checks   = 0;
  int failures = 0;

  bk_carry_network              dut16 (.pg(pg[15:0]), .carry(c16));
  bk_carry_network #(.WIDTH(32)) dut32 (.pg(pg),       .carry(c32));
  bk_carry_network #(.WIDTH(9))  dut9  (.pg(pg[8:0]),  .carry(c9));
  bk_carry_network #(.WIDTH(5))  dut5  (.pg(pg[4:0]),  .carry(c5));

  function automatic logic [31:0] ref_carry(input pg_t [31:0] v, input int w);
    logic c;
    logic [31:0] r;
    c = 1'b0;
    r = '0;
    for (int i = 0; i < w; i++) begin
      c    = v[i].g | (v[i].p & c);
      r[i] = c;
    end
    return r;
  endfunction

  task automatic compare(input string name, input logic [31:0] got, input int w);
    logic [31:0] exp;
    exp = ref_carry(pg, w);
    checks++;
    for (int i = 0; i < w; i++) begin
      if (got[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s bit %0d got=%h exp=%h", name, i, got, exp);
        break;
      end
    end
  endtask

  task automatic check();
    #1;
    compare("w16", 32'(c16), 16);
    compare("w32", c32,      32);
    compare("w9",  32'(c9),   9);
    compare("w5",  32'(c5),   5);
  endtask

  task automatic set_from_operands(input logic [31:0] a, input logic [31:0] b);
    for (int i = 0; i < 32; i++) begin
      pg[i].p = a[i] ^ b[i];
      pg[i].g = a[i] & b[i];
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
    // full propagate run with a generate only at bit 0
    set_from_operands(32'hFFFF_FFFF, 32'h0000_0001); check();
    set_from_operands('0, '0);                       check();
    set_from_operands(32'h5555_5555, 32'hFFFF_FFFF); check();
    // generate at each single position below a propagate run
    for (int k = 0; k < 32; k++) begin
      set_from_operands(32'hFFFF_FFFF ^ (32'h1 << k), 32'h0);
      pg[k] = '{p: 1'b0, g: 1'b1};
      check();
    end
    repeat (500) begin
      set_from_operands($urandom, $urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
