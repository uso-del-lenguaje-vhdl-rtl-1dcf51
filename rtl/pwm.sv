// Centre-aligned PWM driven by a 12-bit duty word.
//
// A free-running W-bit counter defines a period of 2^W clocks. The duty word
// is sampled when the counter is zero, so it changes only at period
// boundaries. From the sampled duty d a threshold th = (2^(W-1)-1) - d/2 is
// registered; the output goes high when the counter equals th and low when
// it equals (2^W-1) - th. The pulse is therefore centred on the middle of
// the period and lasts 2*floor(d/2) + 1 clocks. The threshold passes through
// two registers (the 11-bit difference, then the zero-extended compare
// value), so a new duty acts from the second clock after it is sampled.
//
// The counter, the duty sampling at zero, the two-stage threshold and the two
// compare values follow the document. Reset is asynchronous, active high;
// resetting the threshold registers to the zero-duty value is this design's
// choice.
module pwm #(
  parameter int W = 12
) (
  input  logic         clk_i,
  input  logic         rst_i,
  input  logic [W-1:0] f3_i,
  output logic         fout_o
);

  localparam logic [W-1:0] HALF_M1 = {1'b0, {(W-1){1'b1}}};  // 0x7FF
  localparam logic [W-1:0] ALL1    = '1;                      // 0xFFF

  logic [W-1:0] cntr_q, duty_q, th_q;
  logic [W-2:0] diff_q;                // (2^(W-1)-1) - d/2, W-1 bits

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      cntr_q <= '0;
      duty_q <= '0;
      diff_q <= HALF_M1[W-2:0];
      th_q   <= HALF_M1;
      fout_o <= 1'b0;
    end else begin
      cntr_q <= cntr_q + 1'b1;
      if (cntr_q == '0) duty_q <= f3_i;
      diff_q <= HALF_M1[W-2:0] - duty_q[W-1:1];
      th_q   <= {1'b0, diff_q};
      if (cntr_q == th_q)              fout_o <= 1'b1;
      else if (cntr_q == (ALL1 - th_q)) fout_o <= 1'b0;
    end
  end

endmodule
