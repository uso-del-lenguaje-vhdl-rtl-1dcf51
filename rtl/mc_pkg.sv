// Shared types and fixed-point helpers for the sliding-mode motor controller.
//
// The control datapath works on 32-bit signed fixed-point numbers with one
// sign bit, 11 integer bits and 20 fraction bits (Q11.20), the arithmetic
// format chosen for the FPGA implementation. ADC samples and PWM duty counts
// are 12-bit integers. Products are formed at 64 bits, shifted back by the
// 20 fraction bits (rounding toward minus infinity) and saturated to the
// 32-bit range; sums saturate too, so an overflow clips instead of wrapping.
// Saturation and rounding are this design's choice.
package mc_pkg;

  localparam int QW   = 32;                 // word width
  localparam int FRAC = 20;                 // fraction bits

  typedef logic signed [QW-1:0] q_t;        // Q11.20 value

  localparam q_t Q_ONE     = q_t'(1 <<< FRAC);
  localparam q_t Q_MAX     = q_t'(32'sh7FFF_FFFF);
  localparam q_t Q_MIN     = q_t'(32'sh8000_0000);

  // Transform constants, round(x * 2^20)
  localparam q_t C_SQRT2_3  = q_t'(856159);   // sqrt(2/3)
  localparam q_t C_INV_SQ2  = q_t'(741455);   // 1/sqrt(2)
  localparam q_t C_INV_SQ6  = q_t'(428079);   // 1/sqrt(6)
  localparam q_t C_THIRD    = q_t'(349525);   // 1/3

  // Real number to Q11.20, rounded to nearest (elaboration time only, for
  // parameters).
  function automatic q_t to_q(real r);
    real s;
    s = r * real'(1 <<< FRAC);
    return q_t'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  // Saturate a wide signed value to the Q11.20 range.
  function automatic q_t q_sat(logic signed [65:0] x);
    if (x > 66'(signed'(Q_MAX)))      return Q_MAX;
    else if (x < 66'(signed'(Q_MIN))) return Q_MIN;
    else                               return q_t'(x);
  endfunction

  function automatic q_t q_add(q_t a, q_t b);
    return q_sat(66'(a) + 66'(b));
  endfunction

  function automatic q_t q_sub(q_t a, q_t b);
    return q_sat(66'(a) - 66'(b));
  endfunction

  function automatic q_t q_mul(q_t a, q_t b);
    logic signed [65:0] p;
    p = 66'(a) * 66'(b);
    return q_sat(p >>> FRAC);
  endfunction

  // Limit to [lo, hi]
  function automatic q_t q_clip(q_t x, q_t lo, q_t hi);
    if (x > hi)      return hi;
    else if (x < lo) return lo;
    else             return x;
  endfunction

endpackage
