// Pulse control of the inverter firing controller.
//
// Three 4-input multiplexers route the pulse trains S_alpha, S_beta and
// S_gamma to the inverter switch signals Sa, Sb and Sc. Every multiplexer has
// the same data inputs (D0 = S_alpha, D1 = S_beta, D2 = S_gamma, D3 = 0) and
// its own two select bits, formed from the sector flags A1..A6:
//   Sa: S0 = A3|A4, S1 = A2|A5
//   Sb: S0 = A5|A6, S1 = A1|A4
//   Sc: S0 = A1|A2, S1 = A3|A6
// giving, sector 1..6: Sa = a g b b g a, Sb = g a a g b b, Sc = b b g a a g
// (a, b, g for alpha, beta, gamma); every sector hands each train to exactly
// one phase. With en_i low all outputs are 0. Combinational.
//
// The multiplexer structure, the data inputs, the constant D3 and the
// always-on enable follow the document's schematic; which sector flags drive
// which select line is read from it as the one assignment that gives each
// phase a different train in every sector.
module pulse_control (
  input  logic [5:0] sector_i,    // one-hot, bit k-1 = sector Ak
  input  logic       en_i,
  input  logic       s_alpha_i,
  input  logic       s_beta_i,
  input  logic       s_gamma_i,
  output logic       sa_o,
  output logic       sb_o,
  output logic       sc_o
);

  logic a1, a2, a3, a4, a5, a6;
  logic [1:0] sel_a, sel_b, sel_c;
  logic [3:0] d;

  assign {a6, a5, a4, a3, a2, a1} = sector_i;
  assign d = {1'b0, s_gamma_i, s_beta_i, s_alpha_i};

  always_comb begin
    sel_a = {a2 | a5, a3 | a4};
    sel_b = {a1 | a4, a5 | a6};
    sel_c = {a3 | a6, a1 | a2};
    sa_o  = en_i & d[sel_a];
    sb_o  = en_i & d[sel_b];
    sc_o  = en_i & d[sel_c];
  end

endmodule
