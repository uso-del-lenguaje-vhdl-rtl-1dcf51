// Self-checking test of the centre-aligned pwm. For a series of duty words
// it measures, over whole counter periods, the period (2^12 clocks), the
// high time (2*floor(d/2)+1 clocks) and that the pulse is centred: it starts
// 2047 - d/2 clocks and ends 4095 - (2047 - d/2) clocks after the counter
// period begins (plus the output register delay of one clock).
module tb_pwm;
  localparam int W = 12, N = 1 << W;
  logic clk = 0, rst = 1;
  logic [W-1:0] duty;
  logic fout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwm dut (.clk_i(clk), .rst_i(rst), .f3_i(duty), .fout_o(fout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // clocks since the counter was zero (testbench's own count)
  int phase;
  always @(posedge clk) phase <= rst ? 0 : (phase + 1) % N;

  int rise_at, fall_at, highs;
  logic fout_d;
  always @(posedge clk) fout_d <= fout;

  task automatic measure(int d);
    int th;
    duty = W'(d);
    // let the duty be sampled, then skip one full period
    @(posedge clk iff phase == 0);
    @(posedge clk iff phase == 0);
    highs = 0; rise_at = -1; fall_at = -1;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      #1;
      if (fout) highs++;
      if (fout && !fout_d && rise_at < 0) rise_at = phase;
      if (!fout && fout_d && fall_at < 0) fall_at = phase;
    end
    th = (N / 2 - 1) - d / 2;
    check(highs == 2 * (d / 2) + 1, $sformatf("duty %0d: high %0d clocks", d, highs));
    check(rise_at == (th + 1) % N, $sformatf("duty %0d: rise at %0d expected %0d", d, rise_at, th + 1));
    if (th != 0)
      check(fall_at == ((N - 1 - th) + 1) % N, $sformatf("duty %0d: fall at %0d", d, fall_at));
  endtask

  initial begin
    duty = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    measure(0);
    measure(1);
    measure(2048);
    measure(100);
    measure(4000);
    repeat (6) measure(int'($urandom_range(0, 4093)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
