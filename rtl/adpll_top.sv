// adpll_top: all-digital bang-bang PLL with adaptive co-optimisation of its
// proportional and integral gains. With the default divider it multiplies a
// 100 MHz reference by 32 to 3.2 GHz.
//
// Loop: the BBPFD compares the reference with the divided oscillator clock and
// gives one early/late bit per reference cycle, together with a
// comparison-done strobe. On that strobe (this design's choice of clock; it
// keeps the loop delay close to zero) the loop filter and the gain optimiser
// take the bit. The optimiser steps beta by the
// sign of y[n]*y[n-1] and alpha by the sign of y[n]*y[n-2]; the loop filter
// drives the oscillator through two separate paths, a proportional word
// (+/- beta) and a 10-bit integral code, with no adder between them. The
// integral code is split into 31-bit row and column thermometer codes for
// the digitally controlled resistor that sets the ring oscillator's supply.
// The oscillator output is divided by 32 in a ripple divider and fed back.
//
// The BBPFD and the DCO are behavioural models (see their files); everything
// else is synthesisable and runs in the domain of the comparison-done strobe.
//
// Configuration comes from the I2C register block (i2c_regs, clocked by the
// inverted reference so its outputs change half a reference period away from
// the loop filter's clock):
//   CTRL.opt_beta_en / opt_alpha_en  adapt beta / alpha; while low, that gain
//                                    is held at its init register value;
//   CTRL.load_code, init code        force the integral code.
// After reset both gains adapt, starting from 17*2^-7 and 17*2^-20, and the
// integral code starts at RST_CODE, so the PLL acquires lock with no register
// access. SDA is open drain (sda_oe = 1 pulls low).
// Observation outputs give the gains, codes, the BBPFD decision count and
// the gain events.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int  DIV_STAGES  = 5,        // divide ratio 2^5 = 32
  parameter logic [6:0] I2C_ADDR = 7'h52,
  parameter int  BETA_FRAC   = 4,
  parameter int  ALPHA_FRAC  = 4,
  parameter int  RST_CODE    = 512,
  parameter real F_MIN_HZ    = 1.9e9,
  parameter real F_MAX_HZ    = 4.05e9,
  parameter real PN_1MHZ_DBC = -90.5,
  parameter real FWALK_HZ    = 0.0
) (
  input  logic                       ref_clk,
  input  logic                       rst_n,
  input  logic                       scl,
  input  logic                       sda_in,
  output logic                       sda_oe,
  output logic                       clk_out,
  output logic                       clk_fb,
  output logic                       bb_up,
  output logic                       bb_dn,
  output gain_t                      beta,
  output gain_t                      alpha,
  output gain_evt_t                  beta_evt,
  output gain_evt_t                  alpha_evt,
  output logic [CODE_W-1:0]          code,
  output logic                       code_sat,
  output logic signed [PROP_W-1:0]   prop,
  output logic [THERM_W-1:0]         row,
  output logic [THERM_W-1:0]         col,
  output logic [31:0]                decisions
);
  timeunit 1ps;
  timeprecision 1fs;

  logic        dlf_clk;
  logic        reg_clk;
  pll_cfg_t    cfg;
  pll_status_t status;

  // Tuning registers, clocked half a reference period away from the loop.
  assign reg_clk = ~ref_clk;
  assign status  = '{beta: beta, alpha: alpha, code: code};

  i2c_regs #(.DEV_ADDR(I2C_ADDR)) u_regs (
    .clk(reg_clk), .rst_n, .scl, .sda_in, .sda_oe, .cfg, .status
  );


  bbpfd u_bbpfd (
    .clk_ref(ref_clk), .clk_fb, .rst_n,
    .bb_up, .bb_dn, .bb_clk(dlf_clk), .decisions
  );

  gain_optimizer #(.BETA_FRAC(BETA_FRAC), .ALPHA_FRAC(ALPHA_FRAC)) u_opt (
    .clk(dlf_clk), .rst_n, .bb_up,
    .opt_beta_en(cfg.opt_beta_en), .opt_alpha_en(cfg.opt_alpha_en),
    .beta_init(cfg.beta_init), .alpha_init(cfg.alpha_init),
    .beta, .alpha, .beta_evt, .alpha_evt
  );

  dlf #(.RST_CODE(RST_CODE)) u_dlf (
    .clk(dlf_clk), .rst_n, .bb_up, .beta, .alpha,
    .load_code(cfg.load_code), .init_code(cfg.init_code), .prop, .code, .code_sat
  );

  dcr_decoder u_dec (.code, .row, .col);

  dco #(
    .F_MIN_HZ(F_MIN_HZ), .F_MAX_HZ(F_MAX_HZ),
    .PN_1MHZ_DBC(PN_1MHZ_DBC), .FWALK_HZ(FWALK_HZ)
  ) u_dco (
    .row, .col, .prop, .clk_out
  );

  divider #(.STAGES(DIV_STAGES)) u_div (
    .clk_in(clk_out), .rst_n, .clk_div(clk_fb)
  );

endmodule
