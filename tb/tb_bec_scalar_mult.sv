// End-to-end testbench of bec_scalar_mult at its default size (k = 233,
// 233-bit scalar). Draws a complete binary Edwards curve (d1 = d2 = d with
// trace 1) and random points on it, and checks each result Q against a
// plain double-and-add reference e*P, as the same projective point:
//   - random scalars with random blinding points
//   - the same e and P with two different blinding points: same point, but
//     different projective coordinates (the blinding is visible inside)
//   - e = 0 (neutral element (0:0:1)), e = 1 (P) and e = all ones
//   - every result lies on the curve
//   - latency: done exactly 25 + 14*233 = 3287 edges after start
// It counts how often each mechanism ran: INIT addition, first round,
// later rounds, rounds with key bit 0 and with key bit 1, final addition
// and a start ignored while busy, and fails if one never did.
module tb_bec_scalar_mult;
  import bec_pkg::*;
  import bec_ref_pkg::*;

  localparam int unsigned T = 233;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [T-1:0] e;
  point_t       p, r, r_neg, q;
  felem_t       d;
  logic         busy, done;
  int           checks = 0, failures = 0;

  bec_scalar_mult dut (
    .clk, .rst_n, .start, .e, .p, .r, .r_neg, .d1(d), .d2(d),
    .busy, .done, .q
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled at the last layer of each program
  int n_init = 0, n_first = 0, n_steady = 0, n_bit0 = 0, n_bit1 = 0, n_final = 0;
  int n_ignored_start = 0;
  always @(negedge clk) begin
    if (rst_n && dut.exec && 32'(dut.layer) == prog_layers(dut.prog) - 1) begin
      case (dut.prog)
        PROG_PA:     if (dut.final_pa) n_final++; else n_init++;
        PROG_FIRST:  n_first++;
        default:     n_steady++;
      endcase
      if (dut.prog != PROG_PA) begin
        if (dut.bit_b) n_bit1++; else n_bit0++;
      end
    end
    if (start && busy) n_ignored_start++;
  end

  task automatic fail(string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  task automatic run(logic [T-1:0] key, point_t base, point_t blind, output point_t res);
    int cyc;
    e = key; p = base; r = blind; r_neg = neg(blind);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      if (cyc == 100) start = 1'b1;     // must be ignored
      @(negedge clk);
      start = 1'b0;
      cyc++;
      if (cyc > 4000) break;
    end
    checks++;
    if (cyc != 25 + 14 * T) fail($sformatf("latency %0d", cyc));
    res = q;
  endtask

  task automatic check_mul(logic [T-1:0] key, point_t base, point_t blind, string what,
                           output point_t res);
    point_t ref_q;
    run(key, base, blind, res);
    ref_q = smul(key, T, base, d);
    checks++;
    if (!same_point(res, ref_q)) fail({what, ": wrong point"});
    checks++;
    if (!on_curve(res, d)) fail({what, ": off the curve"});
  endtask

  initial begin
    point_t pt, q1, q2, qx;
    logic [T-1:0] key;
    d = rand_d();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    pt = rand_point(d);
    for (int i = 0; i < T; i++) key[i] = 1'($urandom_range(0, 1));
    check_mul(key, pt, rand_point(d), "random e", q1);
    check_mul(key, pt, rand_point(d), "same e, new blinding", q2);
    checks++;
    if (q1 == q2) fail("blinding does not change the projective result");
    checks++;
    if (!same_point(q1, q2)) fail("blinded results differ");

    check_mul('0, pt, rand_point(d), "e = 0", qx);
    checks++;
    if (!same_point(qx, '{x: '0, y: '0, z: felem_t'(1)})) fail("0*P is not the neutral element");
    check_mul(T'(1), pt, rand_point(d), "e = 1", qx);
    checks++;
    if (!same_point(qx, pt)) fail("1*P is not P");
    check_mul('1, rand_point(d), rand_point(d), "e = all ones", qx);
    for (int i = 0; i < T; i++) key[i] = 1'($urandom_range(0, 1));
    check_mul(key, rand_point(d), rand_point(d), "random e, new P", qx);

    $display("mechanisms: init=%0d first=%0d steady=%0d bit0=%0d bit1=%0d final=%0d ignored_start=%0d",
             n_init, n_first, n_steady, n_bit0, n_bit1, n_final, n_ignored_start);
    checks++;
    if (n_init != 6 || n_first != 6 || n_steady != 6 * (T - 1) || n_final != 6)
      fail("program counts");
    checks++;
    if (n_bit0 == 0 || n_bit1 == 0 || n_ignored_start == 0) fail("a mechanism never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
