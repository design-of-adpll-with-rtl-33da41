// gain_optimizer: adaptive co-optimisation of the proportional gain beta and
// the integral gain alpha of a bang-bang PLL from the sign of the BBPFD output.
//
// Once per reference cycle the loop filter clock samples the BBPFD decision
// y[n] (1 = UP, the reference edge came first; 0 = DN). The block keeps the
// last two decisions and forms two one-bit products:
//   lag 1: y[n]*y[n-1]  (+1 when equal) -> raises beta, else lowers it
//   lag 2: y[n]*y[n-2]  (+1 when equal) -> raises alpha, else lowers it
// Each product steps a gain_accumulator, so beta follows the sign of the
// first-order autocorrelation R_yy(1) and alpha the sign of the second-order
// one R_yy(2); both settle where those correlations average to zero. No
// averaging is done: only the sign of the correlation matters. This is the
// structure of the thesis (delay z^-1 or z^-2, multiplier, accumulator); the
// start-up gains, the step size and the fill logic after reset are this
// design's choices.
//
// Interface: opt_beta_en / opt_alpha_en enable adaptation of each gain
// separately; while an enable is low that gain is held at its init value
// (loaded every cycle), which gives the fixed-gain modes the thesis compares
// against. Gains change on the clock edge after the sample that caused them,
// so the loop filter uses them from the following reference cycle. Reset
// sets both gains to their smallest values, 17*2^-7 and 17*2^-20.
module gain_optimizer
  import adpll_pkg::*;
#(
  parameter int BETA_FRAC  = 4,
  parameter int ALPHA_FRAC = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bb_up,          // sampled BBPFD decision
  input  logic                    opt_beta_en,
  input  logic                    opt_alpha_en,
  input  gain_t                   beta_init,
  input  gain_t                   alpha_init,
  output gain_t                   beta,
  output gain_t                   alpha,
  output gain_evt_t               beta_evt,
  output gain_evt_t               alpha_evt
);
  timeunit 1ps;
  timeprecision 1fs;

  logic       y1, y2;        // y[n-1], y[n-2]
  logic [1:0] fill;          // how many past samples are valid (saturates at 2)
  logic       lag1_valid, lag2_valid;
  logic       corr1_pos, corr2_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1   <= 1'b0;
      y2   <= 1'b0;
      fill <= 2'd0;
    end else begin
      y1 <= bb_up;
      y2 <= y1;
      if (fill != 2'd2) fill <= fill + 2'd1;
    end
  end

  assign lag1_valid = (fill != 2'd0);
  assign lag2_valid = (fill == 2'd2);
  assign corr1_pos  = ~(bb_up ^ y1);   // sign of y[n]*y[n-1]
  assign corr2_pos  = ~(bb_up ^ y2);   // sign of y[n]*y[n-2]

  gain_accumulator #(
    .FRAC_BITS(BETA_FRAC), .EXP_MIN(BETA_EXP_MIN), .EXP_MAX(BETA_EXP_MAX),
    .RST_MANT(MANT_MIN), .RST_EXP(BETA_EXP_MIN)
  ) u_beta (
    .clk, .rst_n,
    .load(!opt_beta_en), .init_mant(beta_init.mant), .init_exp(beta_init.exp),
    .en(opt_beta_en && lag1_valid), .inc(corr1_pos),
    .gain(beta), .evt(beta_evt)
  );

  gain_accumulator #(
    .FRAC_BITS(ALPHA_FRAC), .EXP_MIN(ALPHA_EXP_MIN), .EXP_MAX(ALPHA_EXP_MAX),
    .RST_MANT(MANT_MIN), .RST_EXP(ALPHA_EXP_MIN)
  ) u_alpha (
    .clk, .rst_n,
    .load(!opt_alpha_en), .init_mant(alpha_init.mant), .init_exp(alpha_init.exp),
    .en(opt_alpha_en && lag2_valid), .inc(corr2_pos),
    .gain(alpha), .evt(alpha_evt)
  );

endmodule
