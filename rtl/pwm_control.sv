// PWM control: converts the three phase voltage commands into the three
// on-times T_alpha, T_beta, T_gamma and the sector angle for the inverter
// firing controller.
//
// Each phase voltage is first mapped linearly around half the firing period,
// T = P/2 + V*kv, limited to [0, P]; kv is the scale in counts per volt (P/E
// for a DC-link voltage E gives full modulation at V = +-E/2). The firing
// controller routes its pulse trains by sector: in every sector it gives the
// alpha train to the phase with the highest voltage, gamma to the middle one
// and beta to the lowest. So this block orders the phases by voltage and
// outputs T_alpha = largest, T_gamma = middle, T_beta = smallest on-time, and
// the angle at the centre of the sector the ordering identifies:
//   sector 1: Va >= Vb >= Vc    2: Vb >= Va >= Vc    3: Vb >= Vc >= Va
//   sector 4: Vc >= Vb >= Va    5: Vc >= Va >= Vb    6: Va >= Vc >= Vb
// (equal voltages fit two sectors; either gives the same result). With that
// angle each phase switch ends up carrying its own on-time. One clock of
// latency: results and valid_o on the clock after valid_i; clamp_o flags,
// with the result, that at least one on-time hit a limit.
//
// The block's place (Va, Vb, Vc in, T_alpha, T_beta, T_gamma out) follows
// the document's diagram, which says only that it generates the duty cycles.
// The linear mapping, the ordering rule (read from the firing controller's
// routing) and the sector-angle output are this design's choices.
module pwm_control
  import mc_pkg::*;
#(
  parameter int W = 12
) (
  input  logic         clk_i,
  input  logic         rst_i,
  input  logic         valid_i,
  input  q_t           va_i,
  input  q_t           vb_i,
  input  q_t           vc_i,
  input  q_t           kv_i,
  input  logic [W-1:0] p_i,
  output logic [W-1:0] t_alpha_o,
  output logic [W-1:0] t_beta_o,
  output logic [W-1:0] t_gamma_o,
  output logic [W-1:0] angle_o,
  output logic         valid_o,
  output logic         clamp_o
);

  // on-time in counts, integer part of P/2 + V*kv, limited to [0, P];
  // bit W flags a limited value. Worked at 66 bits: P itself exceeds Q11.20.
  function automatic logic [W:0] on_time(q_t v, q_t kv, logic [W-1:0] p);
    logic signed [65:0] t, pq;
    pq = 66'(p) <<< FRAC;
    t  = (pq >>> 1) + ((66'(v) * 66'(kv)) >>> FRAC);
    if (t < 0)         return {1'b1, {W{1'b0}}};
    else if (t > pq)   return {1'b1, p};
    else               return {1'b0, t[FRAC +: W]};
  endfunction

  // centre of sector k (1..6) as a fraction of a turn: (2k-1)/12 * 2^W
  function automatic logic [W-1:0] sector_centre(int k);
    return W'(((2 * k - 1) * (1 << W)) / 12);
  endfunction

  logic [W:0]   ta, tb, tc;
  logic [W-1:0] t_max, t_mid, t_min, ang;
  logic         ab, bc, ac;      // Va >= Vb, Vb >= Vc, Va >= Vc

  always_comb begin
    ta = on_time(va_i, kv_i, p_i);
    tb = on_time(vb_i, kv_i, p_i);
    tc = on_time(vc_i, kv_i, p_i);
    ab = (va_i >= vb_i);
    bc = (vb_i >= vc_i);
    ac = (va_i >= vc_i);
    // the on-time is monotonic in the voltage, so the voltage order is also
    // the on-time order
    if (ab && bc) begin              // a >= b >= c
      t_max = ta[W-1:0]; t_mid = tb[W-1:0]; t_min = tc[W-1:0]; ang = sector_centre(1);
    end else if (!ab && ac) begin    // b > a >= c
      t_max = tb[W-1:0]; t_mid = ta[W-1:0]; t_min = tc[W-1:0]; ang = sector_centre(2);
    end else if (!ab && bc) begin    // b >= c > a
      t_max = tb[W-1:0]; t_mid = tc[W-1:0]; t_min = ta[W-1:0]; ang = sector_centre(3);
    end else if (!bc && !ac) begin   // c > b, c > a, b >= a
      if (ab) begin                  // c > a >= b
        t_max = tc[W-1:0]; t_mid = ta[W-1:0]; t_min = tb[W-1:0]; ang = sector_centre(5);
      end else begin                 // c > b > a
        t_max = tc[W-1:0]; t_mid = tb[W-1:0]; t_min = ta[W-1:0]; ang = sector_centre(4);
      end
    end else begin                   // a >= c > b
      t_max = ta[W-1:0]; t_mid = tc[W-1:0]; t_min = tb[W-1:0]; ang = sector_centre(6);
    end
  end

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      t_alpha_o <= '0;
      t_beta_o  <= '0;
      t_gamma_o <= '0;
      angle_o   <= '0;
      clamp_o   <= 1'b0;
      valid_o   <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        t_alpha_o <= t_max;
        t_gamma_o <= t_mid;
        t_beta_o  <= t_min;
        angle_o   <= ang;
        clamp_o   <= ta[W] | tb[W] | tc[W];
      end
    end
  end

endmodule
