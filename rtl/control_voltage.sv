// Control voltage calculation of the sliding-mode current controller.
//
//   Vd = R*Id - p*wr*Lq*Iq        - K1*sat(S1)
//   Vq = R*Iq + p*wr*(Ld*Id + PHI_M) - K2*sat(S2)
// where p is the number of pole pairs, S1, S2 the switching surfaces and
// K1, K2 the switching gains. sat(S) = S*SAT_GAIN limited to [-1, +1]. For
// Vd the datapath is two multipliers (K1 x sat(S1), p*wr x Lq*Iq), an adder
// joining them and an adder with R*Id. Q11.20 values; one clock of latency,
// results and valid_o on the clock after valid_i. sat_o[0] / sat_o[1] flag,
// with the result, that sat(S1) / sat(S2) was at a limit.
//
// The Vd equation and its datapath follow the document. The Vq equation is
// built the same way from the motor model (the document prints only Vd), and
// the width of the saturation band and the motor constants are this design's.
module control_voltage
  import mc_pkg::*;
#(
  parameter real R          = 1.0,
  parameter real LD         = 0.01,
  parameter real LQ         = 0.01,
  parameter real PHI_M      = 0.1,
  parameter int  POLE_PAIRS = 4,
  parameter real SAT_GAIN   = 1.0     // 1 / boundary-layer width
) (
  input  logic       clk_i,
  input  logic       rst_i,
  input  logic       valid_i,
  input  q_t         id_i,
  input  q_t         iq_i,
  input  q_t         wr_i,
  input  q_t         s1_i,
  input  q_t         s2_i,
  input  q_t         k1_i,
  input  q_t         k2_i,
  output q_t         vd_o,
  output q_t         vq_o,
  output logic       valid_o,
  output logic [1:0] sat_o
);

  localparam q_t QR   = to_q(R);
  localparam q_t QLD  = to_q(LD);
  localparam q_t QLQ  = to_q(LQ);
  localparam q_t QPHI = to_q(PHI_M);
  localparam q_t QSG  = to_q(SAT_GAIN);
  localparam q_t ONE  = q_t'(1 <<< FRAC);

  q_t   pw, sat1, sat2, sw1, sw2, cross_d, cross_q, vd_n, vq_n;
  q_t   s1g, s2g;
  logic lim1, lim2;

  always_comb begin
    s1g  = q_mul(s1_i, QSG);
    s2g  = q_mul(s2_i, QSG);
    sat1 = q_clip(s1g, -ONE, ONE);
    sat2 = q_clip(s2g, -ONE, ONE);
    lim1 = (s1g >= ONE) || (s1g <= -ONE);
    lim2 = (s2g >= ONE) || (s2g <= -ONE);
    pw   = q_sat(66'(wr_i) * 66'(POLE_PAIRS));
    // first row of multipliers
    sw1     = q_mul(k1_i, sat1);
    sw2     = q_mul(k2_i, sat2);
    cross_d = q_mul(pw, q_mul(QLQ, iq_i));
    cross_q = q_mul(pw, q_add(q_mul(QLD, id_i), QPHI));
    // adders
    vd_n = q_sub(q_mul(QR, id_i), q_add(cross_d, sw1));
    vq_n = q_sub(q_add(q_mul(QR, iq_i), cross_q), sw2);
  end

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      vd_o    <= '0;
      vq_o    <= '0;
      sat_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        vd_o  <= vd_n;
        vq_o  <= vq_n;
        sat_o <= {lim2, lim1};
      end
    end
  end

endmodule
