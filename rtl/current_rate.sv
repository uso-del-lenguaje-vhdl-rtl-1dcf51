// Current rate calculation: the time derivatives of the d and q stator
// currents predicted by the permanent-magnet synchronous motor model.
//
// With w = POLE_PAIRS * wr (electrical speed):
//   Idp = ( Vd - R*Id + w*Lq*Iq ) / Ld
//   Iqp = ( Vq - R*Iq - w*(Ld*Id + PHI_M) ) / Lq
// obtained from the motor's voltage and flux equations. The divisions are
// multiplications by 1/Ld and 1/Lq fixed at elaboration. Q11.20 values; one
// clock of latency, results and valid_o on the clock after valid_i.
//
// The equations follow the document's motor model; the motor constants are
// placeholders of this design (set them for the real machine).
module current_rate
  import mc_pkg::*;
#(
  parameter real R          = 1.0,    // stator resistance, ohm
  parameter real LD         = 0.01,   // d inductance, H
  parameter real LQ         = 0.01,   // q inductance, H
  parameter real PHI_M      = 0.1,    // rotor flux, Wb
  parameter int  POLE_PAIRS = 4
) (
  input  logic clk_i,
  input  logic rst_i,
  input  logic valid_i,
  input  q_t   vd_i,
  input  q_t   vq_i,
  input  q_t   id_i,
  input  q_t   iq_i,
  input  q_t   wr_i,
  output q_t   idp_o,
  output q_t   iqp_o,
  output logic valid_o
);

  localparam q_t QR    = to_q(R);
  localparam q_t QLD   = to_q(LD);
  localparam q_t QLQ   = to_q(LQ);
  localparam q_t QIDL  = to_q(1.0 / LD);
  localparam q_t QIQL  = to_q(1.0 / LQ);
  localparam q_t QPHI  = to_q(PHI_M);

  q_t w, num_d, num_q, flux_d;

  always_comb begin
    w      = q_sat(66'(wr_i) * 66'(POLE_PAIRS));
    flux_d = q_add(q_mul(QLD, id_i), QPHI);
    num_d  = q_add(q_sub(vd_i, q_mul(QR, id_i)), q_mul(w, q_mul(QLQ, iq_i)));
    num_q  = q_sub(q_sub(vq_i, q_mul(QR, iq_i)), q_mul(w, flux_d));
  end

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      idp_o   <= '0;
      iqp_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        idp_o <= q_mul(num_d, QIDL);
        iqp_o <= q_mul(num_q, QIQL);
      end
    end
  end

endmodule
