// Self-checking test of signal_proc: f3 = f2*(a*f1 + b) in 12-bit unsigned
// fractions. A few hand-worked vectors, then random vectors against a
// reference computed with integer arithmetic in the testbench.
module tb_signal_proc;
  logic [11:0] f1, f2, a, b, f3;
  int checks = 0, failures = 0;

  signal_proc dut (.f1_i(f1), .f2_i(f2), .coef_a_i(a), .coef_b_i(b), .f3_o(f3));

  // reference: values as integers; 0x800 is one half
  function automatic int ref_f3(int x1, int x2, int ca, int cb);
    int s;
    s = ((ca * x1) / 4096 + cb) % 4096;
    return (x2 * s) / 4096;
  endfunction

  task automatic apply(int x1, int x2, int ca, int cb, int expect_v);
    f1 = 12'(x1); f2 = 12'(x2); a = 12'(ca); b = 12'(cb);
    #1;
    checks++;
    if (int'(f3) != expect_v) begin
      failures++;
      $display("FAIL: f1=%h f2=%h a=%h b=%h -> f3=%h expected %h", f1, f2, a, b, f3, expect_v);
    end
  endtask

  initial begin
    // 0.5 * (0.5*0.5 + 0.25) = 0.25 -> 0x400
    apply('h800, 'h800, 'h800, 'h400, 'h400);
    // 1023/4096*(0 + 0.5) -> 511
    apply('h123, 'h3FF, 'h000, 'h800, 'h1FF);
    // sum wraps: a*f1 upper = 0xFFE, + 4 -> 0x002; 0xFFF*0x002 upper -> 1
    apply('hFFF, 'hFFF, 'hFFF, 'h004, 'h001);
    // all zero
    apply(0, 0, 0, 0, 0);
    repeat (2000) begin
      int x1, x2, ca, cb;
      x1 = int'($urandom_range(0, 4095)); x2 = int'($urandom_range(0, 4095));
      ca = int'($urandom_range(0, 4095)); cb = int'($urandom_range(0, 4095));
      apply(x1, x2, ca, cb, ref_f3(x1, x2, ca, cb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
