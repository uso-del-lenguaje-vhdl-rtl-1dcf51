// Self-checking test of current_rate with its default motor constants
// (R = 1, Ld = Lq = 0.01, flux 0.1, 4 pole pairs). Random Vd, Vq, Id, Iq and
// speed; the expected derivatives are computed in floating point from the
// motor equations and must agree within 0.05 A/s. Inputs are kept small
// enough for the derivatives to stay inside the Q11.20 range.
module tb_current_rate;
  import mc_pkg::*;
  localparam real R = 1.0, LD = 0.01, LQ = 0.01, PHI = 0.1;
  localparam int  PP = 4;
  logic clk = 0, rst = 1, vin = 0, vout;
  q_t vd, vq, id, iq, wr, idp, iqp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  current_rate dut (.clk_i(clk), .rst_i(rst), .valid_i(vin), .vd_i(vd), .vq_i(vq), .id_i(id),
    .iq_i(iq), .wr_i(wr), .idp_o(idp), .iqp_o(iqp), .valid_o(vout));

  function automatic q_t rq(real r); return q_t'($rtoi(r * 1048576.0)); endfunction
  function automatic real qr(q_t q); return real'(q) / 1048576.0; endfunction

  task automatic near(real got, real want, real tol, string what);
    checks++;
    if ((got - want > tol) || (want - got > tol)) begin
      failures++; $display("FAIL: %s = %f expected %f", what, got, want);
    end
  endtask

  initial begin
    vd = '0; vq = '0; id = '0; iq = '0; wr = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      real d, q, i_d, i_q, w, we, edp, eqp;
      // keep |result| < 2047: numerators below 20 V
      d   = (real'($urandom_range(0, 8000)) - 4000.0) / 1000.0;
      q   = (real'($urandom_range(0, 8000)) - 4000.0) / 1000.0;
      i_d = (real'($urandom_range(0, 8000)) - 4000.0) / 1000.0;
      i_q = (real'($urandom_range(0, 8000)) - 4000.0) / 1000.0;
      w   = (real'($urandom_range(0, 40000)) - 20000.0) / 1000.0;
      vd = rq(d); vq = rq(q); id = rq(i_d); iq = rq(i_q); wr = rq(w);
      we  = PP * w;
      edp = (d - R * i_d + we * LQ * i_q) / LD;
      eqp = (q - R * i_q - we * (LD * i_d + PHI)) / LQ;
      vin = 1;
      @(posedge clk); #1;
      vin = 0;
      checks++;
      if (!vout) begin failures++; $display("FAIL: valid_o late"); end
      near(qr(idp), edp, 0.05, "Idp");
      near(qr(iqp), eqp, 0.05, "Iqp");
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
