// Inverter firing controller: turns three duty values into the three
// inverter switch signals Sa, Sb, Sc.
//
// Three pulse generators share the period P and produce the pulse trains
// S_alpha, S_beta, S_gamma with on-times D_ALPHA, D_BETA, D_GAMMA. Because
// they are reset together and use the same P, their periods stay aligned.
// The angle is decoded into one of six sectors, and the pulse control routes
// each train to one phase according to the sector. Outputs follow the pulse
// generators' registers through combinational routing (the sector change
// acts immediately).
//
// The structure and the port names follow the document's block diagram and
// schematic; widths and the pulse generator's internals are this design's.
module inv_firing_controller #(
  parameter int W = 12
) (
  input  logic         clk_i,
  input  logic         rst_i,
  input  logic [W-1:0] angle_i,
  input  logic [W-1:0] p_i,
  input  logic [W-1:0] d_alpha_i,
  input  logic [W-1:0] d_beta_i,
  input  logic [W-1:0] d_gamma_i,
  output logic         sa_o,
  output logic         sb_o,
  output logic         sc_o
);

  logic s_alpha, s_beta, s_gamma;
  logic [5:0] sector;

  pulse_gen #(.W(W)) u_alpha (.clk_i, .rst_i, .p_i, .d_i(d_alpha_i), .out_state_o(s_alpha));
  pulse_gen #(.W(W)) u_beta  (.clk_i, .rst_i, .p_i, .d_i(d_beta_i),  .out_state_o(s_beta));
  pulse_gen #(.W(W)) u_gamma (.clk_i, .rst_i, .p_i, .d_i(d_gamma_i), .out_state_o(s_gamma));

  sector_decoder #(.AW(W)) u_sector (.angle_i, .sector_o(sector));

  pulse_control u_pulse (
    .sector_i (sector),
    .en_i     (1'b1),
    .s_alpha_i(s_alpha),
    .s_beta_i (s_beta),
    .s_gamma_i(s_gamma),
    .sa_o, .sb_o, .sc_o
  );

endmodule
