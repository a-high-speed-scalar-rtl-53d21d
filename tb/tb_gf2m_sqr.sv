// Testbench for gf2m_sqr: squares of random and corner-case elements
// compared with the reference product a*a, including single-bit elements
// whose squares need the reduction.
module tb_gf2m_sqr;
  import bec_pkg::*;
  import bec_ref_pkg::*;

  logic   clk = 1'b0;
  felem_t a, r;
  int     checks = 0, failures = 0;

  gf2m_sqr dut (.a(a), .r(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(felem_t x, felem_t exp);
    a = x;
    @(posedge clk);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL a=%h got %h exp %h", x, r, exp);
    end
  endtask

  initial begin
    felem_t x;
    check('0, '0);
    check(felem_t'(1), felem_t'(1));
    check('1, fmul('1, '1));
    for (int i = 0; i < K; i += 7) check(felem_t'(1) << i, fmul(felem_t'(1) << i, felem_t'(1) << i));
    for (int i = 0; i < 300; i++) begin
      x = rand_fe();
      check(x, fmul(x, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
