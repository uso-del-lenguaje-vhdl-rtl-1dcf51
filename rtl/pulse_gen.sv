// Pulse generator of the inverter firing controller (one per pulse train).
//
// A counter runs from 0 to P-1 and restarts. The output is high while the
// counter is below the on-time D, so each period of P clocks carries one
// pulse of D clocks starting at the period boundary (D >= P gives a steady
// high, D = 0 a steady low). P and D are sampled when a period starts, so a
// change never cuts a period short. The output is registered.
//
// The block's pins (P_IN, D_IN, OUT_STATE) follow the document's schematic;
// the edge-aligned counter and the sampling of P and D are this design's
// choices, as the document gives no internal description.
module pulse_gen #(
  parameter int W = 12
) (
  input  logic         clk_i,
  input  logic         rst_i,
  input  logic [W-1:0] p_i,
  input  logic [W-1:0] d_i,
  output logic         out_state_o
);

  logic [W-1:0] cnt_q, p_q, d_q;
  logic         last;

  // last clock of the period (or idle when P is 0 or 1)
  assign last = (cnt_q + 1'b1 >= p_q);

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      cnt_q       <= '0;
      p_q         <= '0;
      d_q         <= '0;
      out_state_o <= 1'b0;
    end else begin
      if (last) begin
        cnt_q       <= '0;
        p_q         <= p_i;
        d_q         <= d_i;
        out_state_o <= (d_i != '0);
      end else begin
        cnt_q       <= cnt_q + 1'b1;
        out_state_o <= (cnt_q + 1'b1 < d_q);
      end
    end
  end

endmodule
