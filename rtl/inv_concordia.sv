// Inverse Concordia transformation: two-axis control voltages Vd, Vq to the
// three phase voltage commands Va, Vb, Vc.
//
// Va = sqrt(2/3)*Vd, Vb = -Vd/sqrt(6) + Vq/sqrt(2), Vc = -Vd/sqrt(6) -
// Vq/sqrt(2): the inverse of the power-invariant transform in concordia, so
// the three outputs always sum to zero (up to rounding). Q11.20 values; one
// clock of latency, results and valid_o on the clock after valid_i.
//
// The block's place in the controller follows the document's diagram; the
// equations are this design's choice (the document names the transform only).
module inv_concordia
  import mc_pkg::*;
(
  input  logic clk_i,
  input  logic rst_i,
  input  logic valid_i,
  input  q_t   vd_i,
  input  q_t   vq_i,
  output q_t   va_o,
  output q_t   vb_o,
  output q_t   vc_o,
  output logic valid_o
);

  q_t d6, q2;

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      va_o    <= '0;
      vb_o    <= '0;
      vc_o    <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        va_o <= q_mul(C_SQRT2_3, vd_i);
        vb_o <= q_sub(q2, d6);
        vc_o <= q_sub(q_sub('0, d6), q2);
      end
    end
  end

  always_comb begin
    d6 = q_mul(C_INV_SQ6, vd_i);
    q2 = q_mul(C_INV_SQ2, vq_i);
  end

endmodule
