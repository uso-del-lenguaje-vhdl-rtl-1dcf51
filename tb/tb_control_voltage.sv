// Self-checking test of control_voltage with its default constants. Random
// currents, speed, gains and switching surfaces (about half of them outside
// the saturation band) are applied; the expected Vd, Vq are computed in
// floating point from the control law, using the constants as rounded to
// Q11.20, within 2e-3 V, and sat_o must flag
// exactly the surfaces whose sat() was at a limit. Both limits and the
// linear region must each be reached at least once.
module tb_control_voltage;
  import mc_pkg::*;
  localparam real R = 1.0, LD = 0.01, LQ = 0.01, PHI = 0.1;
  localparam int  PP = 4;
  logic clk = 0, rst = 1, vin = 0, vout;
  q_t id, iq, wr, s1, s2, k1, k2, vd, vq;
  logic [1:0] sat;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_lin = 0;

  always #5 clk = ~clk;

  control_voltage dut (.clk_i(clk), .rst_i(rst), .valid_i(vin), .id_i(id), .iq_i(iq), .wr_i(wr),
    .s1_i(s1), .s2_i(s2), .k1_i(k1), .k2_i(k2), .vd_o(vd), .vq_o(vq), .valid_o(vout), .sat_o(sat));

  function automatic q_t rq(real r); return q_t'($rtoi(r * 1048576.0)); endfunction
  function automatic real qr(q_t q); return real'(q) / 1048576.0; endfunction
  // motor constants as the design holds them
  function automatic real qc(real r); return real'($rtoi(r * 1048576.0 + 0.5)) / 1048576.0; endfunction
  function automatic real rsat(real s);
    return (s > 1.0) ? 1.0 : (s < -1.0) ? -1.0 : s;
  endfunction
  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction

  task automatic near(real got, real want, string what);
    checks++;
    if ((got - want > 2e-3) || (want - got > 2e-3)) begin
      failures++; $display("FAIL: %s = %f expected %f", what, got, want);
    end
  endtask

  initial begin
    id = '0; iq = '0; wr = '0; s1 = '0; s2 = '0; k1 = '0; k2 = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      real i_d, i_q, w, a1, a2, g1, g2, evd, evq;
      i_d = rnd(-20.0, 20.0); i_q = rnd(-20.0, 20.0); w = rnd(-300.0, 300.0);
      a1  = rnd(-2.0, 2.0);   a2  = rnd(-2.0, 2.0);
      g1  = rnd(0.0, 100.0);  g2  = rnd(0.0, 100.0);
      id = rq(i_d); iq = rq(i_q); wr = rq(w); s1 = rq(a1); s2 = rq(a2); k1 = rq(g1); k2 = rq(g2);
      evd = qc(R) * i_d - PP * w * qc(LQ) * i_q - g1 * rsat(a1);
      evq = qc(R) * i_q + PP * w * (qc(LD) * i_d + qc(PHI)) - g2 * rsat(a2);
      vin = 1;
      @(posedge clk); #1;
      vin = 0;
      checks++;
      if (!vout) begin failures++; $display("FAIL: valid_o late"); end
      near(qr(vd), evd, "Vd");
      near(qr(vq), evq, "Vq");
      checks++;
      if (sat != {(a2 >= 1.0 || a2 <= -1.0), (a1 >= 1.0 || a1 <= -1.0)}) begin
        failures++; $display("FAIL: sat_o %b for S1=%f S2=%f", sat, a1, a2);
      end
      if (a1 >= 1.0) n_pos++; else if (a1 <= -1.0) n_neg++; else n_lin++;
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_lin == 0) begin
      failures++; $display("FAIL: saturation cases not all reached %0d %0d %0d", n_pos, n_neg, n_lin);
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
