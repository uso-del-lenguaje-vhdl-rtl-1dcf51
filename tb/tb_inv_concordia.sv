// Self-checking test of inv_concordia: random Vd, Vq against the
// floating-point inverse power-invariant transform (within 1e-4 plus 3 ppm), the
// zero-sum property of the three outputs, and the one-clock latency.
module tb_inv_concordia;
  import mc_pkg::*;
  logic clk = 0, rst = 1, vin = 0, vout;
  q_t vd, vq, va, vb, vc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_concordia dut (.clk_i(clk), .rst_i(rst), .valid_i(vin), .vd_i(vd), .vq_i(vq),
    .va_o(va), .vb_o(vb), .vc_o(vc), .valid_o(vout));

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
    vd = '0; vq = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      real d, q;
      d = (real'($urandom_range(0, 400000)) - 200000.0) / 1000.0;
      q = (real'($urandom_range(0, 400000)) - 200000.0) / 1000.0;
      vd = rq(d); vq = rq(q);
      vin = 1;
      @(posedge clk); #1;
      vin = 0;
      checks++;
      if (!vout) begin failures++; $display("FAIL: valid_o late"); end
      near(qr(va), $sqrt(2.0 / 3.0) * d, "Va");
      near(qr(vb), -d / $sqrt(6.0) + q / $sqrt(2.0), "Vb");
      near(qr(vc), -d / $sqrt(6.0) - q / $sqrt(2.0), "Vc");
      checks++;
      if (qr(va) + qr(vb) + qr(vc) > 1e-3 || qr(va) + qr(vb) + qr(vc) < -1e-3) begin
        failures++; $display("FAIL: Va+Vb+Vc = %f", qr(va) + qr(vb) + qr(vc));
      end
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
