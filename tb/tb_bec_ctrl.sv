// Testbench for bec_ctrl: checks the program sequence the controller issues
// for a random scalar (load, 11 INIT layers, 15 FIRST layers, 14 layers per
// later round, 11 FINAL layers), that bit_b presents the key bits most
// significant first and stays constant within a round, that start is
// ignored while busy, and that done comes exactly 25 + 14*T edges after
// start (3287 for the default T = 233). A second instance with T = 2 covers
// a short scalar.
module tb_bec_ctrl;
  import bec_pkg::*;

  localparam int unsigned T = 233;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [T-1:0] e;
  logic         load, exec, bit_b, final_pa, busy, done;
  prog_e        prog;
  logic [3:0]   layer;
  int           checks = 0, failures = 0;

  bec_ctrl dut (
    .clk, .rst_n, .start, .e, .load, .exec, .prog, .layer, .bit_b,
    .final_pa, .busy, .done
  );

  logic [1:0] e2;
  logic       load2, exec2, bit2, fin2, busy2, done2;
  prog_e      prog2;
  logic [3:0] layer2;
  bec_ctrl #(.T(2)) dut2 (
    .clk, .rst_n, .start, .e(e2), .load(load2), .exec(exec2), .prog(prog2),
    .layer(layer2), .bit_b(bit2), .final_pa(fin2), .busy(busy2), .done(done2)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  // Expected program sequence of one operation of a controller with t bits:
  // returns via the checks performed cycle by cycle on dut (t = T).
  task automatic one_op(logic [T-1:0] key);
    int cyc;
    e = key;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    e = ~key;                         // must have been captured already
    cyc = 1;
    checks++; if (!(load && !exec && busy)) fail("load cycle");
    @(negedge clk); cyc++;
    // INIT
    for (int l = 0; l < 11; l++) begin
      checks++;
      if (!(exec && prog == PROG_PA && 32'(layer) == l && !bit_b && !final_pa)) fail($sformatf("INIT layer %0d", l));
      if (l == 3) begin start = 1'b1; end
      @(negedge clk); cyc++;
      start = 1'b0;
    end
    // rounds
    for (int i = T - 1; i >= 0; i--) begin
      int nl;
      nl = (i == T - 1) ? 15 : 14;
      for (int l = 0; l < nl; l++) begin
        checks++;
        if (!(exec && prog == (i == T - 1 ? PROG_FIRST : PROG_STEADY) && 32'(layer) == l &&
              bit_b == key[i] && !final_pa)) fail($sformatf("round %0d layer %0d", i, l));
        @(negedge clk); cyc++;
      end
    end
    for (int l = 0; l < 11; l++) begin
      checks++;
      if (!(exec && prog == PROG_PA && 32'(layer) == l && final_pa && !done)) fail($sformatf("FINAL layer %0d", l));
      @(negedge clk); cyc++;
    end
    checks++;
    if (!(done && !busy && !exec)) fail("done");
    checks++;
    if (cyc != 25 + 14 * T) fail($sformatf("latency %0d", cyc));
    @(negedge clk);
    checks++; if (done || busy) fail("done is one cycle");
  endtask

  int c2;
  int seen2_b1;
  always @(negedge clk) begin
    if (busy2) c2++;
    if (exec2 && bit2) seen2_b1++;
  end

  initial begin
    logic [T-1:0] key;
    e = '0; e2 = 2'b10; c2 = 0; seen2_b1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (busy || done || exec || load) fail("reset state");
    for (int n = 0; n < 2; n++) begin
      for (int i = 0; i < T; i++) key[i] = 1'($urandom_range(0, 1));
      if (n == 0) key[T-1] = 1'b1;
      one_op(key);
    end
    // the T = 2 instance ran two operations meanwhile (e2 = 10b): 52 busy
    // cycles and 15 layers with bit 1 (the first round) each
    checks++;
    if (c2 != 2 * 52 || seen2_b1 != 2 * 15) fail($sformatf("T=2 instance: busy %0d bit1 layers %0d", c2, seen2_b1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
