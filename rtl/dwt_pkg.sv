// dwt_pkg: constants and helpers shared by the flipped lifting (9,7) DWT cores.
//
// The JPEG2000 (9,7) lifting coefficients a, b, c, d and the normalization
// constant K are the standard values. b and d are rescaled to b' = 16*b and
// d' = 2*d, so that the flipped coefficients 1/(a*b') and 1/(c*d') keep full
// precision; the factors 1/16 and 1/2 then become right shifts in the datapath.
// Every multiplier coefficient is held with COEF_FRAC = 12 fractional bits and
// rounded to nearest. Intermediate data is DATA_W = 16 bits two's complement.
// The coefficient word width (COEF_W) and the rounding of products are this
// design's own choices.
package dwt_pkg;

  parameter int unsigned DATA_W    = 16;  // intermediate data precision
  parameter int unsigned COEF_FRAC = 12;  // fractional bits of every coefficient
  parameter int unsigned COEF_W    = 16;  // sign + 3 integer bits + 12 fraction bits

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // (9,7) lifting coefficients and normalization constant.
  localparam real A_R = -1.586134342;
  localparam real B_R = -0.052980118;
  localparam real C_R =  0.882911076;
  localparam real D_R =  0.443506852;
  localparam real K_R =  1.149604398;
  localparam real BP_R = B_R * 16.0;  // b' = b * 2^4
  localparam real DP_R = D_R * 2.0;   // d' = d * 2

  // Quantize a real coefficient to COEF_FRAC fractional bits (round to nearest).
  function automatic coef_t quant(input real v);
    return coef_t'($rtoi(v * real'(1 << COEF_FRAC) + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Flipped-unit coefficients: the multiplier of each computing unit sits on
  // the vertical (update) branch and holds the inverse of the products so far.
  localparam coef_t C_INV_A   = quant(1.0 / A_R);                   // 1/a
  localparam coef_t C_INV_AB  = quant(1.0 / (A_R * BP_R));          // 1/(a b')
  localparam coef_t C_INV_BC  = quant(1.0 / (BP_R * C_R));          // 1/(b' c)
  localparam coef_t C_INV_CD  = quant(1.0 / (C_R * DP_R));          // 1/(c d')
  // Output scaling that undoes the flipping and applies K and 1/K.
  localparam coef_t C_NORM_LO = quant(A_R * BP_R * C_R * DP_R * K_R); // a b' c d' K
  localparam coef_t C_NORM_HI = quant(A_R * BP_R * C_R / K_R);        // a b' c / K

  // Fixed-point product data * coefficient, rounded to nearest and wrapped to
  // DATA_W bits.
  function automatic data_t cmul(input data_t x, input coef_t c);
    logic signed [DATA_W+COEF_W-1:0] p;
    p = $signed(x) * $signed(c);
    p = p + (DATA_W+COEF_W)'(1 << (COEF_FRAC - 1));
    return data_t'(p >>> COEF_FRAC);
  endfunction

endpackage
