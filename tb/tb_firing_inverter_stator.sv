// Workload test: the inverter firing controller driving a three-phase
// inverter and a motor stator, the arrangement of the firing controller /
// inverter / motor test case. The source shows the switch signals Sa, Sb, Sc,
// two leg voltages swinging between about +100 V and -100 V, and the rotor
// speed. It prints no duty values, period or motor data.
//
// How it works: inv_firing_controller (default 12-bit width) gets fixed
// alpha/beta/gamma on-times and a sector angle that is stepped once per
// window of P clocks, forwards through several turns and then backwards.
// Inside this bench:
//   * a behavioural inverter: each leg is at +E/2 while its switch signal is
//     high and at -E/2 while it is low, the lower switch being the complement
//     of the upper one (no dead time). E = 200 V, chosen to give the +-100 V
//     swing of the printed plot.
//   * a stator: a star-connected R-L winding per phase with a floating
//     neutral and the rotor held still (no back-EMF, no mechanics). The
//     currents follow L di/dt = v_phase - R i, integrated once per clock
//     with one clock = 1 us. R = 1 ohm and L = 10 mH are the values this
//     design assumes elsewhere for the PMSM; the source gives none.
// Checks:
//   * in every window, each leg's mean voltage equals (2T/P - 1) E/2 for the
//     on-time T that the routing table gives that phase in that sector;
//   * after the start-up transient, the stator current space vector (stationary
//     d-q transform) turns by the commanded angle: +2 turns while the angle
//     rises, -2 turns while it falls, within 5 %.
// Mechanisms counted: windows in each of the six sectors, forward and
// backward rotation, and legs held fully on or fully off (on-time P or 0).
// Every count must be non-zero.
module tb_firing_inverter_stator;
  localparam int    W = 12;
  localparam int    P = 200;            // firing period in clocks
  localparam int    STEPS = 48;         // windows per electrical turn
  localparam int    SETTLE = 3;         // turns before measuring
  localparam int    MEAS = 2;           // turns measured
  localparam real   E = 200.0, R = 1.0, L = 0.01, DT = 1.0e-6;
  localparam real   PI = 3.14159265358979;

  logic clk = 0, rst = 1;
  logic [W-1:0] angle, p, da, db, dg;
  logic sa, sb, sc;
  int checks = 0, failures = 0;
  int sector_hits [6];
  int fwd_runs = 0, bwd_runs = 0, full_legs = 0;
  real ia = 0.0, ib = 0.0, ic = 0.0;

  always #5 clk = ~clk;

  inv_firing_controller dut (.clk_i(clk), .rst_i(rst), .angle_i(angle), .p_i(p),
    .d_alpha_i(da), .d_beta_i(db), .d_gamma_i(dg), .sa_o(sa), .sb_o(sb), .sc_o(sc));

  // which train (0 alpha, 1 beta, 2 gamma) reaches each phase, by sector
  int route_a [6] = '{0, 2, 1, 1, 2, 0};
  int route_b [6] = '{2, 0, 0, 2, 1, 1};
  int route_c [6] = '{1, 1, 2, 0, 0, 2};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real leg(logic s);
    return s ? E / 2.0 : -E / 2.0;
  endfunction

  // stator current vector angle in the stationary frame
  function automatic real current_angle();
    real d, q;
    d = $sqrt(2.0 / 3.0) * (ia - ib / 2.0 - ic / 2.0);
    q = (ib - ic) / $sqrt(2.0);
    return $atan2(q, d);
  endfunction

  // One clock of inverter and stator; returns the three leg voltages.
  task automatic step_plant(output real va, output real vb, output real vc);
    real vn;
    @(posedge clk); #1;
    va = leg(sa); vb = leg(sb); vc = leg(sc);
    vn = (va + vb + vc) / 3.0;
    ia += ((va - vn) - R * ia) * DT / L;
    ib += ((vb - vn) - R * ib) * DT / L;
    ic += ((vc - vn) - R * ic) * DT / L;
  endtask

  // Rotate the angle through SETTLE + MEAS turns in direction dir (+1/-1).
  task automatic rotate(int dir, int t_a, int t_b, int t_g);
    int on [3];
    real turned, last, now, delta, want;
    on[0] = t_a; on[1] = t_b; on[2] = t_g;
    da = W'(t_a); db = W'(t_b); dg = W'(t_g);
    for (int t = 0; t < 3; t++) if (on[t] == 0 || on[t] == P) full_legs++;
    turned = 0.0;
    last = 0.0;
    for (int k = 0; k < (SETTLE + MEAS) * STEPS; k++) begin
      int pos, s;
      real sum_a, sum_b, sum_c, va, vb, vc;
      // window centre angle, 4096 = one turn
      pos = (dir > 0) ? k % STEPS : (STEPS - 1) - (k % STEPS);
      angle = W'(((2 * pos + 1) * 4096) / (2 * STEPS));
      s = (6 * pos) / STEPS;
      sum_a = 0.0; sum_b = 0.0; sum_c = 0.0;
      for (int i = 0; i < P; i++) begin
        step_plant(va, vb, vc);
        sum_a += va; sum_b += vb; sum_c += vc;
      end
      // the first window after an on-time change spans the period in which
      // the pulse generators pick up the new values; skip its check
      if (k >= 2) begin
        sector_hits[s]++;
        check(fabs(sum_a / P - (2.0 * on[route_a[s]] / P - 1.0) * E / 2.0) < 1e-6,
              $sformatf("sector %0d: leg A mean %f V", s + 1, sum_a / P));
        check(fabs(sum_b / P - (2.0 * on[route_b[s]] / P - 1.0) * E / 2.0) < 1e-6,
              $sformatf("sector %0d: leg B mean %f V", s + 1, sum_b / P));
        check(fabs(sum_c / P - (2.0 * on[route_c[s]] / P - 1.0) * E / 2.0) < 1e-6,
              $sformatf("sector %0d: leg C mean %f V", s + 1, sum_c / P));
      end
      now = current_angle();
      if (k == SETTLE * STEPS - 1) last = now;
      if (k >= SETTLE * STEPS) begin
        delta = now - last;
        if (delta > PI) delta -= 2.0 * PI;
        if (delta < -PI) delta += 2.0 * PI;
        turned += delta;
        last = now;
      end
    end
    want = dir * MEAS * 2.0 * PI;
    check(fabs(turned - want) < 0.05 * fabs(want),
          $sformatf("current vector turned %f rad, expected %f", turned, want));
    $display("rotation %0d: current vector turned %f turns, |i| = %f A",
             dir, turned / (2.0 * PI), $sqrt(ia * ia + ib * ib + ic * ic));
    if (dir > 0) fwd_runs++; else bwd_runs++;
  endtask

  initial begin
    angle = '0; p = W'(P); da = '0; db = '0; dg = '0;
    for (int s = 0; s < 6; s++) sector_hits[s] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // alpha = longest, gamma = middle, beta = shortest on-time
    rotate(+1, 160, 40, 100);
    rotate(-1, 160, 40, 100);
    rotate(+1, P, 0, 130);
    rotate(-1, 190, 5, 70);
    $display("mechanisms: sector1=%0d sector2=%0d sector3=%0d sector4=%0d sector5=%0d sector6=%0d forward=%0d backward=%0d full_on_off_legs=%0d",
             sector_hits[0], sector_hits[1], sector_hits[2], sector_hits[3],
             sector_hits[4], sector_hits[5], fwd_runs, bwd_runs, full_legs);
    for (int s = 0; s < 6; s++) check(sector_hits[s] > 0, $sformatf("sector %0d never used", s + 1));
    check(fwd_runs > 0, "no forward rotation");
    check(bwd_runs > 0, "no backward rotation");
    check(full_legs > 0, "no fully on or off leg");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * (SETTLE + MEAS) * STEPS * P + 100 * P) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
