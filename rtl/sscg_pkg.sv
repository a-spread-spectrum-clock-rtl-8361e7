// sscg_pkg: constants shared by the Hershey-Kiss spread-spectrum clock generator.
//
// The numbers below define the DisplayPort 1.2 configuration: a 30 MHz reference,
// an 8-bit slope counter that sweeps between K = 248 and 0, a 14-bit division
// counter stepped by alpha/beta/gamma = 0/1/2, and per-mode integer division N
// with the fractional division word limited to [D_MIN, D_MAX].
//   M1 M0 = 0 0 : 162 MHz, N = 5, D in [6111, 6554],   feedback = VCO
//   M1 M0 = 0 1 : 270 MHz, N = 8, D in [15646, 16383], feedback = VCO
//   M1 M0 = 1 1 : 540 MHz, N = 8, D in [15646, 16383], feedback = VCO / 2
// Average loop division is N + D / 2^14; the modulation period is 4*K cycles of
// the feedback clock (992 cycles = 30.24 kHz at 30 MHz).
package sscg_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SM_W      = 8;      // slope counter / first SDM width
  localparam int unsigned DM_W      = 14;     // division counter / MASH width
  localparam int unsigned SM_K      = 248;    // top of the slope counter sweep

  localparam int unsigned STEP_ALPHA = 0;     // DM step for SM output 0, M0 = 0
  localparam int unsigned STEP_BETA  = 1;     // DM step for SM output 0, M0 = 1
  localparam int unsigned STEP_GAMMA = 2;     // DM step for SM output 1

  localparam int unsigned N_LOW     = 5;      // MMD base ratio, M0 = 0 (162 MHz)
  localparam int unsigned N_HIGH    = 8;      // MMD base ratio, M0 = 1 (270/540 MHz)

  localparam int unsigned DMAX_LOW  = 6554;   // DM counter limits, M0 = 0
  localparam int unsigned DMIN_LOW  = 6111;
  localparam int unsigned DMAX_HIGH = 16383;  // DM counter limits, M0 = 1
  localparam int unsigned DMIN_HIGH = 15646;

  // Charge-pump current selection, one-hot: bit 0 = 10 uA, 1 = 20 uA, 2 = 40 uA.
  typedef enum logic [2:0] {
    CP_10UA = 3'b001,
    CP_20UA = 3'b010,
    CP_40UA = 3'b100
  } cp_sel_e;

  // Output clock rate selected by the external switches {M1, M0}.
  typedef enum logic [1:0] {
    RATE_162 = 2'b00,
    RATE_270 = 2'b01,
    RATE_324 = 2'b10,   // not a DisplayPort rate: M0 = 0 rules with the /2 path
    RATE_540 = 2'b11
  } rate_e;
endpackage
