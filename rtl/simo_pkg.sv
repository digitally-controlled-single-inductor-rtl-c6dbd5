// simo_pkg: constants shared by the digital control stage of the
// single-inductor dual-output boost converter.
//
// The Type-III compensator coefficients are those of the third-order
// discrete transfer function
//   H(z) = (2.985 z^3 - 2.696 z^2 - 2.9785 z + 2.7031275)
//        / (z^3 - 1.962301 z^2 + 1.193807 z - 0.231506)
// quantised to signed fixed point with COEF_FRAC fractional bits (rounded
// to nearest). With 14 fractional bits the quantised denominator still sums
// to zero, so the integrator pole stays exactly at z = 1. The fixed-point
// format is this design's choice; the coefficient values follow the source.
// The 6-bit word width and the 5 MHz switching frequency follow the source
// too; the limiter window and delay-cell values are this design's choices.
package simo_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned WORD_W    = 6;    // ADC / compensator / limiter / DPWM word
  localparam int unsigned COEF_FRAC = 14;   // fractional bits of the coefficients
  localparam int unsigned COEF_W    = 18;   // signed coefficient width

  localparam real B0_R =  2.985;
  localparam real B1_R = -2.696;
  localparam real B2_R = -2.9785;
  localparam real B3_R =  2.7031275;
  localparam real A1_R = -1.962301;
  localparam real A2_R =  1.193807;
  localparam real A3_R = -0.231506;

  localparam real COEF_SCALE = real'(1 << COEF_FRAC);

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t B0 = coef_t'($rtoi(B0_R * COEF_SCALE + 0.5));
  localparam coef_t B1 = coef_t'(-$rtoi(-B1_R * COEF_SCALE + 0.5));
  localparam coef_t B2 = coef_t'(-$rtoi(-B2_R * COEF_SCALE + 0.5));
  localparam coef_t B3 = coef_t'($rtoi(B3_R * COEF_SCALE + 0.5));
  localparam coef_t A1 = coef_t'(-$rtoi(-A1_R * COEF_SCALE + 0.5));
  localparam coef_t A2 = coef_t'($rtoi(A2_R * COEF_SCALE + 0.5));
  localparam coef_t A3 = coef_t'(-$rtoi(-A3_R * COEF_SCALE + 0.5));

  // Switching period (5 MHz) and the default unit delay dt0 = Ts / 64, so that
  // the 6-bit code spans one switching period.
  localparam int unsigned TS_PS         = 200_000;
  localparam int unsigned UNIT_DELAY_PS = TS_PS / 64;   // 3125 ps

  // Default limiter window: 5 % .. 90 % of a 64-step period.
  localparam logic [WORD_W-1:0] LO_LIM_DEF = 6'd4;    // ceil(0.05*64)
  localparam logic [WORD_W-1:0] HI_LIM_DEF = 6'd57;   // floor(0.90*64)
endpackage
