// Self-checking test of concordia. Random three-phase currents, DC-link
// voltages and all eight switch states are applied; the testbench computes
// the expected Id, Iq, Vd, Vq in floating point (power-invariant transform,
// star-connected phase voltages) and requires agreement within 1e-4 plus 3 ppm. It also
// checks the one-clock latency of valid_o.
module tb_concordia;
  import mc_pkg::*;
  logic clk = 0, rst = 1, vin = 0, vout;
  q_t ia, ib, ic, e, id, iq, vd, vq;
  logic sa, sb, sc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  concordia dut (.clk_i(clk), .rst_i(rst), .valid_i(vin), .ia_i(ia), .ib_i(ib), .ic_i(ic),
    .e_i(e), .sa_i(sa), .sb_i(sb), .sc_i(sc), .id_o(id), .iq_o(iq), .vd_o(vd), .vq_o(vq), .valid_o(vout));

  function automatic q_t rq(real r); return q_t'($rtoi(r * 1048576.0)); endfunction
  function automatic real qr(q_t q); return real'(q) / 1048576.0; endfunction

  task automatic near(real got, real want, string what);
    real tol;
    // rounding of the 20-bit constants: about 2 ppm of the magnitude
    tol = 1e-4 + 3e-6 * ((want < 0.0) ? -want : want);
    checks++;
    if ((got - want > tol) || (want - got > tol)) begin
      failures++; $display("FAIL: %s = %f expected %f", what, got, want);
    end
  endtask

  initial begin
    ia = '0; ib = '0; ic = '0; e = '0; {sa, sb, sc} = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      real a, b, c, ev, va, vb, vc, k;
      a  = (real'($urandom_range(0, 20000)) - 10000.0) / 1000.0;
      b  = (real'($urandom_range(0, 20000)) - 10000.0) / 1000.0;
      c  = -(a + b);
      ev = real'($urandom_range(0, 300000)) / 1000.0;
      ia = rq(a); ib = rq(b); ic = rq(c); e = rq(ev);
      {sa, sb, sc} = 3'(n);
      va = ev / 3.0 * (2.0 * sa - sb - sc);
      vb = ev / 3.0 * (2.0 * sb - sa - sc);
      vc = ev / 3.0 * (2.0 * sc - sa - sb);
      k  = $sqrt(2.0 / 3.0);
      vin = 1;
      @(posedge clk); #1;
      vin = 0;
      checks++;
      if (!vout) begin failures++; $display("FAIL: valid_o not set one clock after valid_i"); end
      near(qr(id), k * (a - b / 2.0 - c / 2.0), "Id");
      near(qr(iq), (b - c) / $sqrt(2.0), "Iq");
      near(qr(vd), k * (va - vb / 2.0 - vc / 2.0), "Vd");
      near(qr(vq), (vb - vc) / $sqrt(2.0), "Vq");
      @(posedge clk); #1;
      checks++;
      if (vout) begin failures++; $display("FAIL: valid_o held"); end
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
