// Concordia transformation: three-phase quantities to the two-axis (d, q)
// frame, for the measured currents and for the inverter phase voltages.
//
// Currents: Id = sqrt(2/3)*(Ia - Ib/2 - Ic/2), Iq = (Ib - Ic)/sqrt(2), the
// power-invariant stationary transform. Voltages are not measured; they are
// rebuilt from the switch states Sa, Sb, Sc and the DC-link voltage E as the
// phase voltages of a star-connected load, Vx = E/3*(2Sx - Sy - Sz), and
// transformed the same way. All values are Q11.20 (see mc_pkg). One clock of
// latency: results and valid_o appear on the clock after valid_i.
//
// The block's inputs and outputs follow the document's controller diagram;
// the document names the transform but gives no equations, so the standard
// power-invariant form and the switch-state voltage model are this design's.
module concordia
  import mc_pkg::*;
(
  input  logic clk_i,
  input  logic rst_i,
  input  logic valid_i,
  input  q_t   ia_i,
  input  q_t   ib_i,
  input  q_t   ic_i,
  input  q_t   e_i,
  input  logic sa_i,
  input  logic sb_i,
  input  logic sc_i,
  output q_t   id_o,
  output q_t   iq_o,
  output q_t   vd_o,
  output q_t   vq_o,
  output logic valid_o
);

  q_t e3, va, vb, vc, id_n, iq_n, vd_n, vq_n;

  // (2Sx - Sy - Sz) is in -2..2
  function automatic q_t phase_v(q_t e_third, logic sx, logic sy, logic sz);
    int k;
    k = 2 * int'(sx) - int'(sy) - int'(sz);
    return q_sat(66'(e_third) * 66'(k));
  endfunction

  // d/q of a three-phase set
  function automatic q_t to_d(q_t a, q_t b, q_t c);
    return q_mul(C_SQRT2_3, q_sub(a, q_add(b >>> 1, c >>> 1)));
  endfunction

  function automatic q_t to_q(q_t b, q_t c);
    return q_mul(C_INV_SQ2, q_sub(b, c));
  endfunction

  always_comb begin
    e3   = q_mul(e_i, C_THIRD);
    va   = phase_v(e3, sa_i, sb_i, sc_i);
    vb   = phase_v(e3, sb_i, sa_i, sc_i);
    vc   = phase_v(e3, sc_i, sa_i, sb_i);
    id_n = to_d(ia_i, ib_i, ic_i);
    iq_n = to_q(ib_i, ic_i);
    vd_n = to_d(va, vb, vc);
    vq_n = to_q(vb, vc);
  end

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      id_o    <= '0;
      iq_o    <= '0;
      vd_o    <= '0;
      vq_o    <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        id_o <= id_n;
        iq_o <= iq_n;
        vd_o <= vd_n;
        vq_o <= vq_n;
      end
    end
  end

endmodule
