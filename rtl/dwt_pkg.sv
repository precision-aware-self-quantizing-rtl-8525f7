// dwt_pkg: shared number formats and lifting constants of the 9/7 wavelet.
//
// The 9/7 lifting factorisation uses the four lifting coefficients
// alpha, beta, gamma, delta and the scaling factor zeta. The flipping
// structure multiplies each lifting step by the inverse of its coefficient,
// so the constant multipliers become C0..C5 below. To keep every constant
// below 4 in magnitude, C1, C2 and C3 carry extra power-of-two factors
// (1/16, 1/32, 1/4) that the datapath undoes with the right shifts (>>4,
// >>1, >>1) drawn in the flipping structure; C4 and C5 absorb the
// remaining factors and the final zeta / 1/zeta scaling.
//
// Data format (own choice, the widths come from an offline optimisation
// that is not tabulated): two's complement, DATA_W bits of which FRAC_B are
// fractional. Constants: COEF_W bits, COEF_FB fractional, rounded to nearest.
package dwt_pkg;

  localparam int DATA_W  = 28;  // 16 integer bits (incl. sign) + 12 fraction
  localparam int FRAC_B  = 12;
  localparam int COEF_W  = 20;
  localparam int COEF_FB = 17;  // constants in [-4, 4)

  localparam real ALPHA = -1.586134342;
  localparam real BETA  = -0.05298011854;
  localparam real GAMMA = 0.8829110762;
  localparam real DELTA = 0.4435068522;
  localparam real ZETA  = 1.149604398;

  // Flipped constants with their power-of-two normalisation.
  localparam real C0_R = 1.0 / ALPHA;                              // -0.6304636
  localparam real C1_R = 1.0 / (ALPHA * BETA) / 16.0;              //  0.7437502
  localparam real C2_R = 1.0 / (BETA * GAMMA) / 32.0;              // -0.6680672
  localparam real C3_R = 1.0 / (GAMMA * DELTA) / 4.0;              //  0.6384439
  localparam real C4_R = 32.0 * ALPHA * BETA * GAMMA / ZETA;       //  2.0652442
  localparam real C5_R = 64.0 * ALPHA * BETA * GAMMA * DELTA * ZETA; // 2.4210212

  localparam int SCALE = 1 << COEF_FB;
  localparam logic signed [COEF_W-1:0] C0 = COEF_W'(int'(C0_R * SCALE));
  localparam logic signed [COEF_W-1:0] C1 = COEF_W'(int'(C1_R * SCALE));
  localparam logic signed [COEF_W-1:0] C2 = COEF_W'(int'(C2_R * SCALE));
  localparam logic signed [COEF_W-1:0] C3 = COEF_W'(int'(C3_R * SCALE));
  localparam logic signed [COEF_W-1:0] C4 = COEF_W'(int'(C4_R * SCALE));
  localparam logic signed [COEF_W-1:0] C5 = COEF_W'(int'(C5_R * SCALE));

  // Radix-2 signed digit, two bits: 2'b01 = +1, 2'b00 = 0, 2'b10 = -1.
  typedef logic [1:0] sd_digit_t;
  localparam sd_digit_t SD_POS  = 2'b01;
  localparam sd_digit_t SD_ZERO = 2'b00;
  localparam sd_digit_t SD_NEG  = 2'b10;

  function automatic int sd_value(sd_digit_t d);
    return (d == SD_POS) ? 1 : (d == SD_NEG) ? -1 : 0;
  endfunction

  function automatic sd_digit_t sd_encode(int v);
    return (v > 0) ? SD_POS : (v < 0) ? SD_NEG : SD_ZERO;
  endfunction

  // Pass of the 2-D transform.
  typedef enum logic {PASS_ROW = 1'b0, PASS_COL = 1'b1} pass_t;

endpackage
