// Fixed-point DSP example: f3 = f2 * (a * f1 + b).
//
// All operands are 12-bit unsigned fractions (value = code / 2^12). The
// product a*f1 is formed at 24 bits and its upper 12 bits are added to b
// modulo 2^12; that sum is multiplied by f2 and the upper 12 bits of the
// 24-bit product are the result. Purely combinational, no clock.
//
// The equation, the 12-bit widths and taking f3 from bits 23..12 of the
// second product follow the document; scaling the first product the same way
// before the addition (the document leaves that width conversion implicit)
// is this design's reading.
module signal_proc #(
  parameter int W = 12
) (
  input  logic [W-1:0] f1_i,
  input  logic [W-1:0] f2_i,
  input  logic [W-1:0] coef_a_i,
  input  logic [W-1:0] coef_b_i,
  output logic [W-1:0] f3_o
);

  logic [2*W-1:0] prod1, prod2;
  logic [W-1:0]   sum1;

  always_comb begin
    prod1 = coef_a_i * f1_i;
    sum1  = prod1[2*W-1:W] + coef_b_i;
    prod2 = f2_i * sum1;
    f3_o  = prod2[2*W-1:W];
  end

endmodule
