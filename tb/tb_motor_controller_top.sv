// End-to-end test of motor_controller_top at its default parameters.
//
// A behavioural ADC supplies two phase-current samples per frame. Each test
// step holds the samples, speed, references, switching surfaces, gains and
// sector angle constant for several ADC frames, then checks
//  - the current errors q1, q2 and the commanded Vd, Vq against a
//    floating-point model of ADC scaling, Concordia transform and control law;
//  - the on-time of Sa, Sb and Sc over one firing period against the duty
//    the floating-point model gives for that phase (inverse Concordia and
//    PWM mapping): the on-time ordering in pwm_control and the sector
//    routing in the firing controller must cancel out;
//  - sat_o and clamp_o against the model;
//  - that new duties arrive once per ADC frame (CONV_PERIOD*2*SCK_HALF
//    clocks apart).
// The DSP-to-PWM example is checked once for f3 and the PWM high time.
// Every mechanism (ADC frames, positive/negative/linear sat(S1), duty
// clamping, voltage vectors in all six sectors, PWM pulses) must happen at
// least once.
module tb_motor_controller_top;
  import mc_pkg::*;
  localparam real R = 1.0, LD = 0.01, LQ = 0.01, PHI = 0.1;
  localparam int  PP = 4, P = 150, FRAME_CLKS = 160;

  logic clk = 0, rst = 1;
  logic sck, conv, sdo;
  q_t e, wr, kv, idr, iqr, s1, s2, k1, k2, q1, q2, idp, iqp, vdc, vqc;
  logic [11:0] period, f1, f2, ca, cb, f3, m0, m1;
  logic [1:0] sat;
  logic clamp, dvalid, sa, sb, sc, fout;
  int frames;
  int checks = 0, failures = 0;
  int n_sat_pos = 0, n_sat_neg = 0, n_sat_lin = 0, n_clamp = 0, n_dvalid = 0, n_fout = 0;
  int sec_hits [6];

  always #5 clk = ~clk;

  motor_controller_top dut (
    .clk_i(clk), .rst_i(rst), .adc_sck_o(sck), .adc_conv_o(conv), .adc_sdo_i(sdo),
    .e_i(e), .wr_i(wr), .kv_i(kv), .period_i(period),
    .idr_i(idr), .iqr_i(iqr), .s1_i(s1), .s2_i(s2), .k1_i(k1), .k2_i(k2),
    .q1_o(q1), .q2_o(q2), .idp_o(idp), .iqp_o(iqp),
    .vd_cmd_o(vdc), .vq_cmd_o(vqc), .sat_o(sat), .clamp_o(clamp), .duty_valid_o(dvalid),
    .sa_o(sa), .sb_o(sb), .sc_o(sc),
    .f1_i(f1), .f2_i(f2), .coef_a_i(ca), .coef_b_i(cb), .f3_o(f3), .fout_o(fout));

  adc_model adc (.sck_i(sck), .conv_i(conv), .sdo_o(sdo), .ch0_i(m0), .ch1_i(m1), .frames_o(frames));

  function automatic q_t rq(real r); return q_t'($rtoi(r * 1048576.0)); endfunction
  function automatic real qr(q_t q); return real'(q) / 1048576.0; endfunction
  function automatic real qc(real r); return real'($rtoi(r * 1048576.0 + 0.5)) / 1048576.0; endfunction
  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction
  function automatic real rsat(real s);
    return (s > 1.0) ? 1.0 : (s < -1.0) ? -1.0 : s;
  endfunction


  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic near(real got, real want, real tol, string what);
    check(!((got - want > tol) || (want - got > tol)), $sformatf("%s = %f expected %f", what, got, want));
  endtask

  // duty update spacing
  longint cyc = 0, last_dv = -1;
  always @(posedge clk) begin
    cyc++;
    if (!rst && dvalid) begin
      n_dvalid++;
      if (last_dv >= 0 && cyc - last_dv != FRAME_CLKS) begin
        failures++; $display("FAIL: duty update spacing %0d", cyc - last_dv);
      end
      if (last_dv >= 0) checks++;
      last_dv = cyc;
    end
  end

  logic fout_d;
  always @(posedge clk) begin
    fout_d <= fout;
    if (fout && !fout_d) n_fout++;
  end

  task automatic step();
    real ia, ib, ic, id, iq, w, a1, a2, g1, g2, rd, rq_, evd, evq, va, vb, vc, kvr;
    real v [3], t [3];
    int  want [3], amb [3], ha, hb, hc;
    bit  lim;
    int  c0, c1;
    // operating point
    c0 = int'($urandom_range(0, 4095)) - 2048;
    c1 = int'($urandom_range(0, 4095)) - 2048;
    m0 = 12'(c0); m1 = 12'(c1);
    w  = rnd(-100.0, 100.0);
    a1 = rnd(-2.5, 2.5);  a2 = rnd(-2.5, 2.5);
    g1 = rnd(0.0, 60.0);  g2 = rnd(0.0, 60.0);
    rd = rnd(-5.0, 5.0);  rq_ = rnd(-5.0, 5.0);
    wr = rq(w); s1 = rq(a1); s2 = rq(a2); k1 = rq(g1); k2 = rq(g2); idr = rq(rd); iqr = rq(rq_);
    // let the samples pass through the ADC and the pipeline
    repeat (3) @(posedge clk iff dvalid);
    repeat (P + 2) @(posedge clk);
    // model
    ia = real'(c0) / 256.0; ib = real'(c1) / 256.0; ic = -(ia + ib);
    id = $sqrt(2.0 / 3.0) * (ia - ib / 2.0 - ic / 2.0);
    iq = (ib - ic) / $sqrt(2.0);
    near(qr(q1), rd - id, 2e-3, "q1");
    near(qr(q2), rq_ - iq, 2e-3, "q2");
    evd = qc(R) * id - PP * w * qc(LQ) * iq - g1 * rsat(a1);
    evq = qc(R) * iq + PP * w * (qc(LD) * id + qc(PHI)) - g2 * rsat(a2);
    near(qr(vdc), evd, 5e-3, "Vd command");
    near(qr(vqc), evq, 5e-3, "Vq command");
    check(sat == {(a2 >= 1.0 || a2 <= -1.0), (a1 >= 1.0 || a1 <= -1.0)}, $sformatf("sat_o %b", sat));
    if (a1 >= 1.0) n_sat_pos++; else if (a1 <= -1.0) n_sat_neg++; else n_sat_lin++;
    // duties from the design's own Vd, Vq (checked above)
    va = $sqrt(2.0 / 3.0) * qr(vdc);
    vb = -qr(vdc) / $sqrt(6.0) + qr(vqc) / $sqrt(2.0);
    vc = -qr(vdc) / $sqrt(6.0) - qr(vqc) / $sqrt(2.0);
    v[0] = va; v[1] = vb; v[2] = vc;
    kvr = qr(kv);
    lim = 0;
    for (int j = 0; j < 3; j++) begin
      t[j] = real'(P) / 2.0 + v[j] * kvr;
      amb[j] = 0;
      if (t[j] < 0.0)          begin want[j] = 0; lim = 1; end
      else if (t[j] > real'(P)) begin want[j] = P; lim = 1; end
      else begin
        want[j] = int'($floor(t[j]));
        if (t[j] - $floor(t[j]) < 0.01 || t[j] - $floor(t[j]) > 0.99) amb[j] = 1;
      end
    end
    check(clamp == lim, $sformatf("clamp_o %b expected %b", clamp, lim));
    if (lim) n_clamp++;
    ha = 0; hb = 0; hc = 0;
    for (int i = 0; i < P; i++) begin
      @(posedge clk); #1;
      ha += int'(sa); hb += int'(sb); hc += int'(sc);
    end
    if (!amb[0]) check(ha == want[0], $sformatf("Sa high %0d expected %0d", ha, want[0]));
    if (!amb[1]) check(hb == want[1], $sformatf("Sb high %0d expected %0d", hb, want[1]));
    if (!amb[2]) check(hc == want[2], $sformatf("Sc high %0d expected %0d", hc, want[2]));
    // sector of the voltage vector, from the phase order
    if      (va >= vb && vb >= vc) sec_hits[0]++;
    else if (vb >= va && va >= vc) sec_hits[1]++;
    else if (vb >= vc && vc >= va) sec_hits[2]++;
    else if (vc >= vb && vb >= va) sec_hits[3]++;
    else if (vc >= va && va >= vb) sec_hits[4]++;
    else                           sec_hits[5]++;
  endtask

  initial begin
    for (int i = 0; i < 6; i++) sec_hits[i] = 0;
    e = rq(100.0); kv = rq(real'(P) / 100.0); period = 12'(P);
    wr = '0; idr = '0; iqr = '0; s1 = '0; s2 = '0; k1 = '0; k2 = '0;
    m0 = '0; m1 = '0;
    f1 = 12'h800; f2 = 12'hC00; ca = 12'h400; cb = 12'h200;   // 0.75*(0.25*0.5+0.125) = 0.1875
    repeat (3) @(posedge clk);
    rst = 0;
    // DSP-to-PWM example: f3 = 0x300, high 2*(0x300/2)+1 clocks per 4096
    #1;
    check(f3 == 12'h300, $sformatf("f3 %h expected 300", f3));
    begin
      int hi;
      repeat (4096 * 2) @(posedge clk);
      hi = 0;
      for (int i = 0; i < 4096; i++) begin @(posedge clk); #1; hi += int'(fout); end
      check(hi == 2 * (12'h300 / 2) + 1, $sformatf("fout high %0d clocks", hi));
    end
    for (int n = 0; n < 36; n++) step();
    // every mechanism must have happened
    check(frames > 20, $sformatf("ADC frames %0d", frames));
    check(n_dvalid > 20, $sformatf("duty updates %0d", n_dvalid));
    check(n_sat_pos > 0, "sat(S1) at +1 never reached");
    check(n_sat_neg > 0, "sat(S1) at -1 never reached");
    check(n_sat_lin > 0, "sat(S1) linear region never reached");
    check(n_clamp > 0, "duty clamping never happened");
    check(n_fout > 0, "no PWM pulse on fout");
    for (int i = 0; i < 6; i++) check(sec_hits[i] > 0, $sformatf("sector %0d never used", i + 1));
    $display("mechanisms: frames=%0d duty_updates=%0d sat+=%0d sat-=%0d lin=%0d clamp=%0d fout_pulses=%0d",
             frames, n_dvalid, n_sat_pos, n_sat_neg, n_sat_lin, n_clamp, n_fout);
    $display("voltage vectors per sector: %0d %0d %0d %0d %0d %0d",
             sec_hits[0], sec_hits[1], sec_hits[2], sec_hits[3], sec_hits[4], sec_hits[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
