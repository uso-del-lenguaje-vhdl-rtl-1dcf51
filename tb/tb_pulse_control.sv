// Self-checking test of pulse_control: all six sectors, all eight input
// combinations and both enable levels against the routing table
//   sector  1 2 3 4 5 6
//   Sa      a g b b g a
//   Sb      g a a g b b
//   Sc      b b g a a g
// (a, b, g = alpha, beta, gamma), and that in every sector the three phases
// receive three different trains.
module tb_pulse_control;
  logic [5:0] sector;
  logic en, sal, sbe, sga, sa, sb, sc;
  int checks = 0, failures = 0;

  pulse_control dut (.sector_i(sector), .en_i(en), .s_alpha_i(sal), .s_beta_i(sbe),
                     .s_gamma_i(sga), .sa_o(sa), .sb_o(sb), .sc_o(sc));

  // train index per phase and sector: 0 alpha, 1 beta, 2 gamma
  int route_a [6] = '{0, 2, 1, 1, 2, 0};
  int route_b [6] = '{2, 0, 0, 2, 1, 1};
  int route_c [6] = '{1, 1, 2, 0, 0, 2};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int s = 0; s < 6; s++) begin
      check(route_a[s] != route_b[s] && route_b[s] != route_c[s] && route_a[s] != route_c[s],
            "table is a permutation");
      for (int e = 0; e < 2; e++)
        for (int v = 0; v < 8; v++) begin
          logic [2:0] tr;
          tr = 3'(v);                        // {gamma, beta, alpha}
          sector = 6'b1 << s;
          en = 1'(e);
          {sga, sbe, sal} = tr;
          #1;
          check(sa == (en & tr[route_a[s]]), $sformatf("sector %0d en %0d in %b: Sa %b", s + 1, e, tr, sa));
          check(sb == (en & tr[route_b[s]]), $sformatf("sector %0d en %0d in %b: Sb %b", s + 1, e, tr, sb));
          check(sc == (en & tr[route_c[s]]), $sformatf("sector %0d en %0d in %b: Sc %b", s + 1, e, tr, sc));
        end
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
