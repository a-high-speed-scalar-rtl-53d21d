// Testbench for gf2m_mul: random and corner-case products compared with the
// shift-and-add reference of bec_ref_pkg. Also checks a*1 = a, a*0 = 0,
// commutativity and x^232 * x = x^74 + 1 (the reduction of x^233).
module tb_gf2m_mul;
  import bec_pkg::*;
  import bec_ref_pkg::*;

  logic   clk = 1'b0;
  felem_t a, b, r;
  int     checks = 0, failures = 0;

  gf2m_mul dut (.a(a), .b(b), .r(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(felem_t x, felem_t y, felem_t exp, string what);
    a = x;
    b = y;
    @(posedge clk);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h exp %h", what, x, y, r, exp);
    end
  endtask

  initial begin
    felem_t x, y, one, t;
    one = felem_t'(1);
    t = '0;
    t[74] = 1'b1;
    t[0] = 1'b1;
    check(felem_t'(1) << 232, felem_t'(2), t, "x^232*x");
    for (int i = 0; i < 300; i++) begin
      x = rand_fe();
      y = rand_fe();
      check(x, y, fmul(x, y), "random");
      check(y, x, fmul(x, y), "commute");
      if (i < 20) begin
        check(x, one, x, "a*1");
        check(x, '0, '0, "a*0");
        check('1, x, fmul('1, x), "all-ones");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
