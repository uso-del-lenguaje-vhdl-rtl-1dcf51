// Self-checking test of pulse_gen: for several (P, D) pairs, including D = 0
// and D >= P, it checks that every period lasts P clocks (measured between
// rising edges when 0 < D < P) and carries exactly min(D, P) high clocks.
module tb_pulse_gen;
  localparam int W = 12;
  logic clk = 0, rst = 1;
  logic [W-1:0] p, d;
  logic out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pulse_gen #(.W(W)) dut (.clk_i(clk), .rst_i(rst), .p_i(p), .d_i(d), .out_state_o(out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int pp, int dd);
    int highs, t0, t1;
    p = W'(pp); d = W'(dd);
    // two periods for the new values to take effect
    repeat (2 * pp + 2) @(posedge clk);
    if (dd > 0 && dd < pp) begin
      // align on a rising edge, then measure one period
      @(posedge out); t0 = $time;
      highs = 0;
      for (int i = 0; i < pp; i++) begin
        #1; if (out) highs++;
        @(posedge clk);
      end
      @(posedge out); t1 = $time;
      check((t1 - t0) == pp * 10, $sformatf("P=%0d D=%0d: period %0d clocks", pp, dd, (t1 - t0) / 10));
      check(highs == dd, $sformatf("P=%0d D=%0d: high %0d clocks", pp, dd, highs));
    end else begin
      highs = 0;
      for (int i = 0; i < 3 * pp; i++) begin
        @(posedge clk); #1; if (out) highs++;
      end
      check(highs == (dd == 0 ? 0 : 3 * pp), $sformatf("P=%0d D=%0d: high %0d of %0d", pp, dd, highs, 3 * pp));
    end
  endtask

  initial begin
    p = 0; d = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(10, 3);
    run(10, 9);
    run(10, 1);
    run(100, 37);
    run(50, 0);
    run(50, 50);
    run(50, 70);
    run(4095, 2000);
    repeat (10) begin
      int pp = int'($urandom_range(3, 300));
      run(pp, int'($urandom_range(1, pp - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
