// fp32_pkg: types and constants shared by the single-precision complex multiplier.
//
// An IEEE-754 single is sign (bit 31), biased exponent (bits 30:23, bias 127) and a 23-bit
// fraction (bits 22:0); a normal number carries a hidden leading 1, giving 24 bits of
// precision. The package also names the four mantissa multiplier styles the design can be
// built with. The default quiet NaN and the zero/subnormal handling are this design's own
// choices; the field layout and bias are the standard format.
package fp32_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;  // with hidden bit
  localparam int unsigned BIAS   = 127;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  localparam fp32_t QNAN = '{sign: 1'b0, exp: '1, frac: 23'h400000};

  // Mantissa multiplier styles compared for this design.
  typedef enum logic [1:0] {
    MULT_VEDIC    = 2'd0,  // Urdhva Tiryagbhyam, nine 8x8 blocks and ripple carry adders
    MULT_ARRAY    = 2'd1,  // AND/full-adder cell array
    MULT_CIFM     = 2'd2,  // combined integer/floating-point multiplier, ripple adders
    MULT_CIFM_CLA = 2'd3   // CIFM with carry look ahead adders (default)
  } mult_kind_e;

  function automatic logic is_zero(fp32_t x);   // zero or subnormal (flushed)
    return x.exp == '0;
  endfunction

  function automatic logic is_inf(fp32_t x);
    return x.exp == EXP_MAX && x.frac == '0;
  endfunction

  function automatic logic is_nan(fp32_t x);
    return x.exp == EXP_MAX && x.frac != '0;
  endfunction

endpackage
