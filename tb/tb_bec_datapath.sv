// Testbench for bec_datapath: the datapath is driven one layer per clock
// from the layer ROM, as the controller would, and after each program the
// ladder registers are compared with the reference point formulas:
//   load, PA (INIT mode), FIRST round, STEADY rounds with both key bits,
//   PA in final mode (R0 + R_R).
// Ladder register R0 is checked on the output port; R1 and R_R inside.
module tb_bec_datapath;
  import bec_pkg::*;
  import bec_ref_pkg::*;

  logic       clk = 1'b0;
  logic       load = 1'b0, exec = 1'b0, bit_b = 1'b0, final_pa = 1'b0;
  prog_e      prog = PROG_PA;
  logic [3:0] layer = '0;
  uinstr_t    ui;
  point_t     p, r, r_neg, r0;
  felem_t     d;
  int         checks = 0, failures = 0;
  int         n_b0 = 0, n_b1 = 0;

  bec_microcode u_rom (.prog(prog), .layer(layer), .ui(ui));

  bec_datapath dut (
    .clk(clk), .load(load), .p(p), .r(r), .r_neg(r_neg), .d1(d), .d2(d),
    .exec(exec), .ui(ui), .bit_b(bit_b), .final_pa(final_pa), .r0(r0)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(prog_e pg, logic b, logic fin);
    @(negedge clk);
    prog = pg; bit_b = b; final_pa = fin; exec = 1'b1;
    for (int l = 0; l < prog_layers(pg); l++) begin
      layer = 4'(l);
      @(negedge clk);
    end
    exec = 1'b0;
  endtask

  task automatic expect_pt(point_t got, point_t exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    point_t m0, m1, mr, s;
    logic   b;
    d = rand_d();
    p = rand_point(d);
    r = rand_point(d);
    r_neg = neg(r);
    @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    expect_pt(r0, r, "load R0");
    m0 = r; m1 = p; mr = r_neg;
    run(PROG_PA, 1'b0, 1'b0);
    m1 = padd(m0, m1, d);
    expect_pt(dut.R1q, m1, "INIT R1 = R + P");
    expect_pt(r0, m0, "INIT keeps R0");
    for (int rnd = 0; rnd < 6; rnd++) begin
      b = (rnd < 2) ? 1'(rnd) : 1'($urandom_range(0, 1));
      if (b) n_b1++; else n_b0++;
      s = padd(m0, m1, d);
      if (b) begin m1 = pdbl(m1, d, d); m0 = s; end
      else   begin m0 = pdbl(m0, d, d); m1 = s; end
      mr = pdbl(mr, d, d);
      run(rnd == 0 ? PROG_FIRST : PROG_STEADY, b, 1'b0);
      expect_pt(r0, m0, "round R0");
      expect_pt(dut.R1q, m1, "round R1");
      expect_pt(dut.RRq, mr, "round R_R");
    end
    run(PROG_PA, 1'b0, 1'b1);
    expect_pt(r0, padd(m0, mr, d), "final R0 + R_R");
    checks++;
    if (!on_curve(r0, d)) begin failures++; $display("FAIL result off the curve"); end
    checks++;
    if (n_b0 == 0 || n_b1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
