// Testbench for bec_microcode: runs the three programs of the layer ROM on a
// behavioural model of the datapath (slots 0-1 multiply, 2-3 square, 4-6
// add, using the reference field arithmetic) and compares the results with
// the point formulas of bec_ref_pkg:
//   PROG_PA          (X3:Y3:Z3) = P1 + P2
//   PROG_FIRST       one ladder round from scratch: sum, doubling, 2*R_R
//   PROG_STEADY x N  later rounds, which use the R_R look-ahead values the
//                    previous round left behind, with random key bits
// It also flags any read of a temporary that has not been written yet, a
// register written twice in one layer, and counts the layers of each
// program and the units kept busy (27 multiplications per steady round).
module tb_bec_microcode;
  import bec_pkg::*;
  import bec_ref_pkg::*;

  logic       clk = 1'b0;
  prog_e      prog;
  logic [3:0] layer;
  uinstr_t    ui;
  int         checks = 0, failures = 0;

  bec_microcode dut (.prog(prog), .layer(layer), .ui(ui));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Behavioural register state
  point_t m_r0, m_r1, m_rr;
  felem_t m_tmp [NREG];
  logic   m_ok  [NREG];
  felem_t d;

  function automatic felem_t mrd(reg_e s, logic b, logic fin);
    point_t p1, p2, p3;
    p1 = b ? m_r1 : m_r0;
    p2 = fin ? m_rr : (b ? m_r0 : m_r1);
    p3 = (fin || b) ? m_r0 : m_r1;
    case (s)
      R_D1, R_D2: return d;
      R_X1: return p1.x;  R_Y1: return p1.y;  R_Z1: return p1.z;
      R_X2: return p2.x;  R_Y2: return p2.y;  R_Z2: return p2.z;
      R_X3: return p3.x;  R_Y3: return p3.y;  R_Z3: return p3.z;
      R_XR: return m_rr.x; R_YR: return m_rr.y; R_ZR: return m_rr.z;
      default: begin
        if (!m_ok[s]) begin
          failures++;
          $display("FAIL read of unwritten register %s", s.name());
        end
        return m_tmp[s];
      end
    endcase
  endfunction

  int mults_used;

  // Execute one whole program: all layers, reads before writes per layer.
  task automatic run_prog(prog_e pg, logic b, logic fin);
    felem_t res [NUNITS];
    for (int l = 0; l < prog_layers(pg); l++) begin
      prog  = pg;
      layer = 4'(l);
      @(posedge clk);
      for (int u = 0; u < NUNITS; u++) begin
        felem_t x, y;
        if (ui.u[u].d == R_NONE) continue;
        x = mrd(ui.u[u].a, b, fin);
        if (u >= 2 && u <= 3) res[u] = fsq(x);
        else begin
          y = mrd(ui.u[u].b, b, fin);
          res[u] = (u < 2) ? fmul(x, y) : (x ^ y);
        end
        if (u < 2) mults_used++;
        for (int v = 0; v < u; v++)
          if (ui.u[v].d == ui.u[u].d) begin
            failures++;
            $display("FAIL layer %0d: two writes of %s", l, ui.u[u].d.name());
          end
      end
      for (int u = 0; u < NUNITS; u++) begin
        case (ui.u[u].d)
          R_NONE: ;
          R_X3: if (fin || b) m_r0.x = res[u]; else m_r1.x = res[u];
          R_Y3: if (fin || b) m_r0.y = res[u]; else m_r1.y = res[u];
          R_Z3: if (fin || b) m_r0.z = res[u]; else m_r1.z = res[u];
          R_X3D: if (b) m_r1.x = res[u]; else m_r0.x = res[u];
          R_Y3D: if (b) m_r1.y = res[u]; else m_r0.y = res[u];
          R_Z3D: if (b) m_r1.z = res[u]; else m_r0.z = res[u];
          R_XR: m_rr.x = res[u];
          R_YR: m_rr.y = res[u];
          R_ZR: m_rr.z = res[u];
          default: begin
            m_tmp[ui.u[u].d] = res[u];
            m_ok[ui.u[u].d] = 1'b1;
          end
        endcase
      end
    end
    // beyond the last layer the ROM must issue only dummies
    prog  = pg;
    layer = 4'(prog_layers(pg));
    @(posedge clk);
    checks++;
    if (ui != '0) begin
      failures++;
      $display("FAIL program %s issues work past layer %0d", pg.name(), prog_layers(pg));
    end
  endtask

  task automatic expect_pt(point_t got, point_t exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    point_t p1, p2, pr, s, d0, dr;
    logic   b;
    d  = rand_d();
    // PROG_PA on random curve points, and with the neutral element
    for (int n = 0; n < 3; n++) begin
      foreach (m_ok[i]) m_ok[i] = 1'b0;
      p1 = rand_point(d);
      p2 = (n == 2) ? '{x: '0, y: '0, z: felem_t'(1)} : rand_point(d);
      m_r0 = p1; m_r1 = p2; m_rr = '0;
      mults_used = 0;
      run_prog(PROG_PA, 1'b0, 1'b0);
      expect_pt(m_r1, padd(p1, p2, d), "PA sum");
      expect_pt(m_r0, p1, "PA leaves R0 alone");
      checks++;
      if (mults_used != 19) begin failures++; $display("FAIL PA uses %0d mults", mults_used); end
    end
    // PROG_PA in final mode: R0 <= R0 + R_R
    p1 = rand_point(d); pr = rand_point(d);
    m_r0 = p1; m_r1 = '0; m_rr = pr;
    run_prog(PROG_PA, 1'b0, 1'b1);
    expect_pt(m_r0, padd(p1, pr, d), "final R0 + RR");
    // First round then steady rounds, random bits
    foreach (m_ok[i]) m_ok[i] = 1'b0;
    p1 = rand_point(d); p2 = rand_point(d); pr = rand_point(d);
    m_r0 = p1; m_r1 = p2; m_rr = pr;
    for (int rnd = 0; rnd < 8; rnd++) begin
      b = (rnd == 0) ? 1'b0 : (rnd == 1) ? 1'b1 : 1'($urandom_range(0, 1));
      s  = padd(m_r0, m_r1, d);
      d0 = pdbl(b ? m_r1 : m_r0, d, d);
      dr = pdbl(m_rr, d, d);
      mults_used = 0;
      run_prog(rnd == 0 ? PROG_FIRST : PROG_STEADY, b, 1'b0);
      expect_pt(b ? m_r0 : m_r1, s, "round sum");
      expect_pt(b ? m_r1 : m_r0, d0, "round doubling");
      expect_pt(m_rr, dr, "blinding point doubling");
      checks++;
      if (mults_used != (rnd == 0 ? 30 : 27)) begin
        failures++;
        $display("FAIL round %0d uses %0d mults", rnd, mults_used);
      end
    end
    checks++;
    if (prog_layers(PROG_FIRST) != 15 || prog_layers(PROG_STEADY) != 14) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
