// Self-checking test of pwm_control. For random period P, scale kv and
// phase voltages (some beyond full modulation) the expected per-phase
// on-times floor(P/2 + V*kv) limited to [0, P] are computed in floating point.
// T_alpha must be the on-time of the highest phase voltage, T_gamma of the
// middle and T_beta of the lowest, compared exactly except where the value
// lies within 0.01 count of an integer (rounding of kv). angle_o must be the
// centre of a sector that the voltage order fits (testbench table below).
// clamp_o must flag the limited cases; both limits and all six sectors must
// occur.
module tb_pwm_control;
  import mc_pkg::*;
  logic clk = 0, rst = 1, vin = 0, vout, clamp;
  q_t va, vb, vc, kv;
  logic [11:0] p, ta, tb, tc, ang;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  int sec_hits [6] = '{0, 0, 0, 0, 0, 0};
  // phase order per sector: index of highest, middle, lowest phase (0=a,1=b,2=c)
  int ord_hi [6] = '{0, 1, 1, 2, 2, 0};
  int ord_md [6] = '{1, 0, 2, 1, 0, 2};
  int ord_lo [6] = '{2, 2, 0, 0, 1, 1};

  always #5 clk = ~clk;

  pwm_control dut (.clk_i(clk), .rst_i(rst), .valid_i(vin), .va_i(va), .vb_i(vb), .vc_i(vc),
    .kv_i(kv), .p_i(p), .t_alpha_o(ta), .t_beta_o(tb), .t_gamma_o(tc), .angle_o(ang),
    .valid_o(vout), .clamp_o(clamp));

  function automatic q_t rq(real r); return q_t'($rtoi(r * 1048576.0)); endfunction
  function automatic real qr(q_t q); return real'(q) / 1048576.0; endfunction
  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction

  // returns expected on-time, sets lim when limited, amb when too close to call
  function automatic int expect_t(real v, real k, int pp, output bit lim, output bit amb);
    real t;
    t = real'(pp) / 2.0 + v * k;
    lim = 0; amb = 0;
    if (t < 0.0)            begin lim = 1; return 0;  end
    if (t > real'(pp))      begin lim = 1; return pp; end
    if (t - $floor(t) < 0.01 || t - $floor(t) > 0.99) amb = 1;
    return int'($floor(t));
  endfunction

  initial begin
    va = '0; vb = '0; vc = '0; kv = '0; p = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      real e, k, v [3];
      int  pp, want [3];
      bit  lim [3], amb [3], any;
      logic [11:0] got [3];
      pp = int'($urandom_range(100, 4095));
      e  = rnd(50.0, 300.0);
      k  = real'(pp) / e;
      for (int j = 0; j < 3; j++) v[j] = rnd(-0.7 * e, 0.7 * e);
      if (n % 50 == 7) v[1] = v[0];          // ties
      p = 12'(pp); kv = rq(k); va = rq(v[0]); vb = rq(v[1]); vc = rq(v[2]);
      any = 0;
      for (int j = 0; j < 3; j++) begin
        want[j] = expect_t(qr(rq(v[j])), qr(kv), pp, lim[j], amb[j]);
        any |= lim[j];
        if (lim[j]) begin if (want[j] == 0) n_lo++; else n_hi++; end
      end
      vin = 1;
      @(posedge clk); #1;
      vin = 0;
      begin
        int sec, hi, md, lo;
        // sector from the order of the (quantised) voltages, ties to lower sector
        // with equal voltages two sectors fit; accept the one the design names
        sec = -1;
        for (int s6 = 0; s6 < 6; s6++)
          if (qr(rq(v[ord_hi[s6]])) >= qr(rq(v[ord_md[s6]])) && qr(rq(v[ord_md[s6]])) >= qr(rq(v[ord_lo[s6]])))
            if (sec < 0 || int'(ang) == ((2 * s6 + 1) * 4096) / 12) sec = s6;
        hi = ord_hi[sec]; md = ord_md[sec]; lo = ord_lo[sec];
        sec_hits[sec]++;
        got[0] = ta; got[1] = tc; got[2] = tb;       // alpha, gamma, beta
        checks++;
        if (!vout) begin failures++; $display("FAIL: valid_o late"); end
        checks++;
        if (int'(ang) != ((2 * sec + 1) * 4096) / 12) begin
          failures++; $display("FAIL: angle %0d for sector %0d", ang, sec + 1);
        end
        if (!amb[hi]) begin
          checks++;
          if (int'(ta) != want[hi]) begin failures++; $display("FAIL: T_alpha %0d expected %0d", ta, want[hi]); end
        end
        if (!amb[md]) begin
          checks++;
          if (int'(tc) != want[md]) begin failures++; $display("FAIL: T_gamma %0d expected %0d", tc, want[md]); end
        end
        if (!amb[lo]) begin
          checks++;
          if (int'(tb) != want[lo]) begin failures++; $display("FAIL: T_beta %0d expected %0d", tb, want[lo]); end
        end
        checks++;
        if (!(ta >= tc && tc >= tb)) begin failures++; $display("FAIL: on-times not ordered"); end
      end
      checks++;
      if (clamp != any) begin failures++; $display("FAIL: clamp_o %b expected %b", clamp, any); end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL: limits not reached"); end
    for (int s6 = 0; s6 < 6; s6++) begin
      checks++;
      if (sec_hits[s6] == 0) begin failures++; $display("FAIL: sector %0d never reached", s6 + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
