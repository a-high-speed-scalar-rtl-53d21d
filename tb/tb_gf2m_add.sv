// Testbench for gf2m_add: sums compared with a bit-by-bit reference
// (coefficient i of the sum is 1 when exactly one operand has it).
module tb_gf2m_add;
  import bec_pkg::*;
  import bec_ref_pkg::*;

  logic   clk = 1'b0;
  felem_t a, b, r;
  int     checks = 0, failures = 0;

  gf2m_add dut (.a(a), .b(b), .r(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    felem_t exp;
    for (int n = 0; n < 200; n++) begin
      a = rand_fe();
      b = (n % 10 == 0) ? a : rand_fe();
      for (int i = 0; i < K; i++) exp[i] = (a[i] != b[i]);
      @(posedge clk);
      checks++;
      if (r !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h got %h", a, b, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
