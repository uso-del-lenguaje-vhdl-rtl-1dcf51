// FPGA controller for a three-phase permanent-magnet synchronous motor with
// a sliding-mode current loop, plus the stand-alone DSP-to-PWM example.
//
// Control path (one pass per ADC frame):
//   adc_interface  reads two phase currents (Ia = channel 0, Ib = channel 1),
//                  Ic = -(Ia + Ib); codes enter Q11.20 shifted by ADC_SHIFT.
//   concordia      Ia, Ib, Ic and the switch-state voltages -> Id, Iq, Vd, Vq
//   current_rate   motor-model current derivatives Idp, Iqp
//   control_voltage sliding-mode law -> Vd, Vq commands
//   inv_concordia  -> Va, Vb, Vc
//   pwm_control    -> on-times ordered as T_alpha (highest phase voltage),
//                     T_gamma (middle), T_beta (lowest), and the sector angle
//   inv_firing_controller -> switch signals Sa, Sb, Sc (fed back to concordia);
//                     its sector routing hands each phase its own on-time
// The pipeline from a new ADC sample to new on-times is four clocks; the
// firing controller applies them at the start of its next period. The
// current errors q1 = Idr - Id, q2 = Iqr - Iq and the rates Idp, Iqp are
// brought out for the switching-surface and gain calculations, which are
// outside this design; their results S1, S2, K1, K2 and the current
// references Idr, Iqr come in as inputs, as do the rotor speed, the DC-link
// voltage, the modulation scale and the firing period.
//
// Example path: signal_proc computes f3 = f2*(a*f1 + b) and pwm turns f3 into
// a centre-aligned pulse on fout_o.
//
// The block structure follows the document's controller diagrams; the ADC
// channel assignment, the ADC scaling and the sample-driven pipeline are this
// design's choices. Reset is asynchronous and active high throughout.
module motor_controller_top
  import mc_pkg::*;
#(
  parameter int ADC_SHIFT = 12          // ADC code -> Q11.20 (1 LSB = 2^-8 A)
) (
  input  logic        clk_i,
  input  logic        rst_i,
  // ADC
  output logic        adc_sck_o,
  output logic        adc_conv_o,
  input  logic        adc_sdo_i,
  // operating inputs
  input  q_t          e_i,
  input  q_t          wr_i,
  input  q_t          kv_i,
  input  logic [11:0] period_i,
  // current references and sliding-mode terms
  input  q_t          idr_i,
  input  q_t          iqr_i,
  input  q_t          s1_i,
  input  q_t          s2_i,
  input  q_t          k1_i,
  input  q_t          k2_i,
  output q_t          q1_o,
  output q_t          q2_o,
  output q_t          idp_o,
  output q_t          iqp_o,
  // status
  output q_t          vd_cmd_o,
  output q_t          vq_cmd_o,
  output logic [1:0]  sat_o,
  output logic        clamp_o,
  output logic        duty_valid_o,
  // inverter switches
  output logic        sa_o,
  output logic        sb_o,
  output logic        sc_o,
  // DSP-to-PWM example
  input  logic [11:0] f1_i,
  input  logic [11:0] f2_i,
  input  logic [11:0] coef_a_i,
  input  logic [11:0] coef_b_i,
  output logic [11:0] f3_o,
  output logic        fout_o
);

  // ---------------- ADC ----------------
  logic [11:0] ch0, ch1;
  logic        adc_valid;

  adc_interface u_adc (
    .clk_i, .rst_i,
    .sck_o(adc_sck_o), .ad_conv_o(adc_conv_o), .sdo_i(adc_sdo_i),
    .ch0_o(ch0), .ch1_o(ch1), .valid_o(adc_valid)
  );

  q_t ia, ib, ic;
  always_comb begin
    ia = q_t'(signed'(ch0)) <<< ADC_SHIFT;
    ib = q_t'(signed'(ch1)) <<< ADC_SHIFT;
    ic = q_sub('0, q_add(ia, ib));
  end

  // ---------------- Concordia ----------------
  q_t   id, iq, vd_meas, vq_meas;
  logic c_valid;

  concordia u_conc (
    .clk_i, .rst_i, .valid_i(adc_valid),
    .ia_i(ia), .ib_i(ib), .ic_i(ic), .e_i,
    .sa_i(sa_o), .sb_i(sb_o), .sc_i(sc_o),
    .id_o(id), .iq_o(iq), .vd_o(vd_meas), .vq_o(vq_meas), .valid_o(c_valid)
  );

  assign q1_o = q_sub(idr_i, id);
  assign q2_o = q_sub(iqr_i, iq);

  // ---------------- current rates ----------------
  logic r_valid;

  current_rate u_rate (
    .clk_i, .rst_i, .valid_i(c_valid),
    .vd_i(vd_meas), .vq_i(vq_meas), .id_i(id), .iq_i(iq), .wr_i,
    .idp_o, .iqp_o, .valid_o(r_valid)
  );

  // ---------------- control voltages ----------------
  logic v_valid;

  control_voltage u_ctrl (
    .clk_i, .rst_i, .valid_i(c_valid),
    .id_i(id), .iq_i(iq), .wr_i,
    .s1_i, .s2_i, .k1_i, .k2_i,
    .vd_o(vd_cmd_o), .vq_o(vq_cmd_o), .valid_o(v_valid), .sat_o
  );

  // ---------------- inverse Concordia ----------------
  q_t   va, vb, vc;
  logic a_valid;

  inv_concordia u_iconc (
    .clk_i, .rst_i, .valid_i(v_valid),
    .vd_i(vd_cmd_o), .vq_i(vq_cmd_o),
    .va_o(va), .vb_o(vb), .vc_o(vc), .valid_o(a_valid)
  );

  // ---------------- PWM control ----------------
  logic [11:0] t_alpha, t_beta, t_gamma, angle;

  pwm_control u_pwmc (
    .clk_i, .rst_i, .valid_i(a_valid),
    .va_i(va), .vb_i(vb), .vc_i(vc), .kv_i, .p_i(period_i),
    .t_alpha_o(t_alpha), .t_beta_o(t_beta), .t_gamma_o(t_gamma),
    .angle_o(angle), .valid_o(duty_valid_o), .clamp_o
  );

  // ---------------- inverter firing controller ----------------
  inv_firing_controller u_fire (
    .clk_i, .rst_i, .angle_i(angle), .p_i(period_i),
    .d_alpha_i(t_alpha), .d_beta_i(t_beta), .d_gamma_i(t_gamma),
    .sa_o, .sb_o, .sc_o
  );

  // ---------------- DSP-to-PWM example ----------------
  signal_proc u_sp (.f1_i, .f2_i, .coef_a_i, .coef_b_i, .f3_o);

  pwm u_pwm (.clk_i, .rst_i, .f3_i(f3_o), .fout_o);

  // r_valid marks when Idp/Iqp are fresh; it is informative only.
  logic unused_r_valid;
  assign unused_r_valid = r_valid;

endmodule
