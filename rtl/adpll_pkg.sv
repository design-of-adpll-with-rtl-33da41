// adpll_pkg: constants and types shared by the bang-bang ADPLL with
// proportional/integral gain co-optimisation.
//
// Both loop gains are held in mantissa-and-exponent form,
//   beta  = beta_int  * 2^beta_exp,   beta_int  in 17..48, beta_exp  in -7..1
//   alpha = alpha_int * 2^alpha_exp,  alpha_int in 17..48, alpha_exp in -20..-5
// which are the ranges the gain stages are built for. The mantissa is kept
// with FRAC_BITS fractional bits so that one correlation sample moves the
// gain by a small step (the number of fractional bits is this design's choice).
// The oscillator control word is 10 bits; the proportional path output is
// expressed in units of 2^-PROP_FRAC of one oscillator code LSB, so that the
// smallest beta (17 * 2^-7) is still represented exactly.
package adpll_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int MANT_W     = 6;    // integer bits of a gain mantissa (0..63)
  localparam int MANT_MIN   = 17;   // lowest mantissa value
  localparam int MANT_MAX   = 48;   // highest mantissa value
  localparam int EXP_W      = 6;    // signed exponent width (-32..31)

  localparam int BETA_EXP_MIN  = -7;
  localparam int BETA_EXP_MAX  = 1;
  localparam int ALPHA_EXP_MIN = -20;
  localparam int ALPHA_EXP_MAX = -5;

  localparam int CODE_W     = 10;   // oscillator control code from the loop filter
  localparam int THERM_W    = 31;   // width of the row and the column thermometer codes

  localparam int PROP_FRAC  = 7;    // proportional output LSB = 2^-7 code LSB (= 2^BETA_EXP_MIN)
  localparam int PROP_W     = MANT_W + (BETA_EXP_MAX - BETA_EXP_MIN) + 1;      // signed
  localparam int INT_FRAC   = 20;   // integral accumulator LSB = 2^-20 code LSB (= 2^ALPHA_EXP_MIN)
  localparam int ALPHA_W    = MANT_W + (ALPHA_EXP_MAX - ALPHA_EXP_MIN);          // unsigned step width

  // A gain in mantissa/exponent form (integer part of the mantissa only).
  typedef struct packed {
    logic        [MANT_W-1:0] mant;
    logic signed [EXP_W-1:0]  exp;
  } gain_t;

  // Events a gain accumulator reports, used for observation and testing.
  typedef struct packed {
    logic renorm_up;   // mantissa halved, exponent incremented
    logic renorm_dn;   // mantissa doubled, exponent decremented
    logic sat_hi;      // at the top of the range, increase refused
    logic sat_lo;      // at the bottom of the range, decrease refused
  } gain_evt_t;

  // Tuning registers of the PLL (written over I2C).
  typedef struct packed {
    logic              opt_beta_en;   // adapt beta
    logic              opt_alpha_en;  // adapt alpha
    logic              load_code;     // force the integral code to init_code
    gain_t             beta_init;     // beta used while beta is not adapting
    gain_t             alpha_init;    // alpha used while alpha is not adapting
    logic [CODE_W-1:0] init_code;
  } pll_cfg_t;

  // Read-only state of the loop, readable over I2C.
  typedef struct packed {
    gain_t             beta;
    gain_t             alpha;
    logic [CODE_W-1:0] code;
  } pll_status_t;

  // Register addresses.
  localparam logic [7:0] REG_CTRL       = 8'h00;  // [0] opt_beta_en [1] opt_alpha_en [2] load_code
  localparam logic [7:0] REG_BETA_MANT  = 8'h01;
  localparam logic [7:0] REG_BETA_EXP   = 8'h02;
  localparam logic [7:0] REG_ALPHA_MANT = 8'h03;
  localparam logic [7:0] REG_ALPHA_EXP  = 8'h04;
  localparam logic [7:0] REG_CODE_LO    = 8'h05;  // init_code[7:0]
  localparam logic [7:0] REG_CODE_HI    = 8'h06;  // init_code[9:8]
  localparam logic [7:0] REG_ST_BMANT   = 8'h08;  // read only from here on
  localparam logic [7:0] REG_ST_BEXP    = 8'h09;
  localparam logic [7:0] REG_ST_AMANT   = 8'h0A;
  localparam logic [7:0] REG_ST_AEXP    = 8'h0B;
  localparam logic [7:0] REG_ST_CODE_LO = 8'h0C;
  localparam logic [7:0] REG_ST_CODE_HI = 8'h0D;

endpackage
