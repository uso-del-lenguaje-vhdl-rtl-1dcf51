// Self-checking test of inv_firing_controller. With fixed on-times for the
// alpha, beta and gamma trains it places the angle in each of the six
// sectors and counts, over one firing period, the high clocks of Sa, Sb and
// Sc; each must equal the on-time of the train the routing table gives that
// phase in that sector:
//   sector  1 2 3 4 5 6
//   Sa      a g b b g a
//   Sb      g a a g b b
//   Sc      b b g a a g
module tb_inv_firing_controller;
  localparam int W = 12, P = 200;
  logic clk = 0, rst = 1;
  logic [W-1:0] angle, p, da, db, dg;
  logic sa, sb, sc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_firing_controller dut (.clk_i(clk), .rst_i(rst), .angle_i(angle), .p_i(p),
    .d_alpha_i(da), .d_beta_i(db), .d_gamma_i(dg), .sa_o(sa), .sb_o(sb), .sc_o(sc));

  int route_a [6] = '{0, 2, 1, 1, 2, 0};
  int route_b [6] = '{2, 0, 0, 2, 1, 1};
  int route_c [6] = '{1, 1, 2, 0, 0, 2};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int a0, int a1, int a2);
    int on [3];
    on[0] = a0; on[1] = a1; on[2] = a2;
    da = W'(a0); db = W'(a1); dg = W'(a2);
    repeat (2 * P + 2) @(posedge clk);
    for (int s = 0; s < 6; s++) begin
      int ha, hb, hc;
      // middle of the sector: (s + 0.5) * 4096 / 6
      angle = W'(((2 * s + 1) * 4096) / 12);
      ha = 0; hb = 0; hc = 0;
      for (int i = 0; i < P; i++) begin
        @(posedge clk); #1;
        ha += int'(sa); hb += int'(sb); hc += int'(sc);
      end
      check(ha == on[route_a[s]], $sformatf("sector %0d: Sa high %0d expected %0d", s + 1, ha, on[route_a[s]]));
      check(hb == on[route_b[s]], $sformatf("sector %0d: Sb high %0d expected %0d", s + 1, hb, on[route_b[s]]));
      check(hc == on[route_c[s]], $sformatf("sector %0d: Sc high %0d expected %0d", s + 1, hc, on[route_c[s]]));
    end
  endtask

  initial begin
    angle = '0; p = W'(P); da = '0; db = '0; dg = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(150, 90, 20);
    run(10, 120, 190);
    run(0, 200, 77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * P) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
