// tb_adpll_modes: compares the three gain configurations of the PLL on the
// same noisy oscillator: (1) both gains optimised, (2) beta optimised with
// alpha fixed large (48*2^-5), (3) beta optimised with alpha fixed small
// (17*2^-20). For each it measures the rms timing error between the
// reference and the divided clock edges over a window after settling.
//
// The oscillator is given a narrower tuning range (3.0 to 3.4 GHz over the
// 10-bit code, 0.39 MHz per step instead of 2.1 MHz) and a random walk of
// its frequency (FWALK_HZ) on top of its white phase noise, so that the
// oscillator's low-frequency noise, not the code quantisation, sets the
// error, as in the comparison this design is meant to reproduce. Checks:
// each configuration stays locked (no slips in its window); after
// acquisition beta has come down and alpha has settled strictly inside its
// range; the optimised configuration's rms error is no worse than the better
// fixed one by more than 10 %. Finally alpha is re-enabled from its largest
// value and must come back down (at least three downward renormalisations)
// to an error again no worse than the better fixed case by more than 10 %. The lag-1 and lag-2
// sign autocorrelations are measured in each window; the lag-2 one must be
// positive with alpha fixed small and negative with alpha fixed large, and
// both must be within +/-0.05 where both gains adapt.
module tb_adpll_modes;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  parameter real FWALK = 2.0e3;
  localparam logic [6:0] DEV = 7'h52;
  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic scl, m_oe, s_oe, sda;
  gain_t beta, alpha;
  gain_evt_t beta_evt, alpha_evt;
  logic clk_out, clk_fb, bb_up, bb_dn, code_sat;
  logic [CODE_W-1:0] code;
  logic signed [PROP_W-1:0] prop;
  logic [THERM_W-1:0] row, col;
  logic [31:0] decisions;

  assign sda = ~(m_oe | s_oe);

  adpll_top #(.F_MIN_HZ(3.0e9), .F_MAX_HZ(3.4e9), .FWALK_HZ(FWALK)) dut (
    .ref_clk, .rst_n, .scl, .sda_in(sda), .sda_oe(s_oe), .clk_out, .clk_fb, .bb_up, .bb_dn,
    .beta, .alpha, .beta_evt, .alpha_evt, .code, .code_sat, .prop, .row, .col, .decisions);

  i2c_master #(.T_Q_PS(250000.0)) m (.scl, .sda_oe(m_oe), .sda);

  always #5000 ref_clk = ~ref_clk;

  int checks = 0, failures = 0;
  int n_slip = 0, a_rdn = 0, b_rdn = 0;
  logic [31:0] last_dec = '0;
  realtime t_ref = 0.0;
  real sum_sq = 0.0;
  longint n_err = 0;

  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge clk_fb) if (rst_n && t_ref > 0.0) begin
    real e;
    e = $realtime - t_ref;
    if (e > 5000.0) e = e - 10000.0;
    sum_sq += e * e;
    n_err++;
  end
  always @(negedge ref_clk) if (rst_n) begin
    if (decisions == last_dec) n_slip++;
    last_dec = decisions;
  end
  // Sign autocorrelation of the decisions at lags 1 and 2 (sums of +/-1
  // products) over the current measuring window.
  int y1 = 0, y2 = 0, r1 = 0, r2 = 0, nr = 0;
  always @(decisions) if (rst_n) begin
    int y;
    #20;
    a_rdn += alpha_evt.renorm_dn;
    b_rdn += beta_evt.renorm_dn;
    y = bb_up ? 1 : -1;
    r1 += y * y1;
    r2 += y * y2;
    nr++;
    y2 = y1;
    y1 = y;
  end

  function automatic real gval(gain_t g);
    return real'(g.mant) * (2.0 ** real'(g.exp));
  endfunction

  task automatic set_alpha(input gain_t g, input logic a_en);
    m.write_regs(DEV, REG_ALPHA_MANT, 2, {16'd0, 8'(signed'(g.exp)), 8'(g.mant)});
    m.write_regs(DEV, REG_CTRL, 1, {30'd0, a_en, 1'b1});
  endtask

  // rms timing error (ps) and slips over n reference cycles.
  task automatic measure(input string what, input int n, output real rms, output real rr1,
                         output real rr2);
    int s0;
    s0 = n_slip; sum_sq = 0.0; n_err = 0; r1 = 0; r2 = 0; nr = 0;
    repeat (n) @(posedge ref_clk);
    rms = $sqrt(sum_sq / real'(n_err));
    rr1 = real'(r1) / real'(nr);
    rr2 = real'(r2) / real'(nr);
    checks++;
    if (n_slip != s0) begin failures++; $display("%s: %0d slips", what, n_slip - s0); end
    $display("%s: rms error %0.3f ps, R(1) %0.4f, R(2) %0.4f, beta=%0d*2^%0d alpha=%0d*2^%0d code=%0d",
             what, rms, rr1, rr2, beta.mant, beta.exp, alpha.mant, alpha.exp, code);
  endtask

  initial begin
    real r_opt, r_large, r_small, r_best, r_back;
    real c1_opt, c2_opt, c1_large, c2_large, c1_small, c2_small, c1_back, c2_back;
    int a0;
    gain_t g;
    #1000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    // (1) both gains optimised from reset.
    repeat (60000) @(posedge ref_clk);
    measure("both optimised", 20000, r_opt, c1_opt, c2_opt);
    checks++;
    if (alpha.exp == ALPHA_EXP_MIN && alpha.mant == MANT_MIN || alpha.exp == ALPHA_EXP_MAX && alpha.mant == MANT_MAX) begin
      failures++; $display("alpha at a range limit");
    end
    checks++;
    if (gval(beta) > 8.0) begin failures++; $display("beta did not come down"); end
    // (2) alpha fixed large.
    g.mant = 6'd48; g.exp = 6'(ALPHA_EXP_MAX);
    set_alpha(g, 1'b0);
    repeat (10000) @(posedge ref_clk);
    measure("alpha large", 20000, r_large, c1_large, c2_large);
    // (3) alpha fixed small.
    g.mant = 6'd17; g.exp = 6'(ALPHA_EXP_MIN);
    set_alpha(g, 1'b0);
    repeat (10000) @(posedge ref_clk);
    measure("alpha small", 20000, r_small, c1_small, c2_small);
    r_best = (r_large < r_small) ? r_large : r_small;
    // With beta adapting, the lag-2 correlation tells the integral gain's
    // error: positive when alpha is too small, negative when too large.
    checks++;
    if (!(c2_small > 0.0 && c2_large < 0.0)) begin
      failures++; $display("R(2) signs wrong: alpha small %f, alpha large %f", c2_small, c2_large);
    end
    // Where both gains adapt, both correlations are driven to zero.
    checks++;
    if (c1_opt > 0.05 || c1_opt < -0.05 || c2_opt > 0.05 || c2_opt < -0.05 ||
        c1_back > 0.05 || c1_back < -0.05 || c2_back > 0.05 || c2_back < -0.05) begin
      failures++; $display("correlations not near zero with both gains adapting");
    end
    checks++;
    if (r_opt > 1.1 * r_best) begin
      failures++; $display("optimised loop worse than the better fixed configuration");
    end
    // (4) alpha optimised again, starting from its largest value: it must come
    // back down through several exponents.
    g.mant = 6'd48; g.exp = 6'(ALPHA_EXP_MAX);
    set_alpha(g, 1'b0);
    set_alpha(g, 1'b1);
    a0 = a_rdn;
    repeat (40000) @(posedge ref_clk);
    measure("alpha optimised from its maximum", 20000, r_back, c1_back, c2_back);
    $display("beta renorm down=%0d, alpha renorm down=%0d (%0d in the last phase)", b_rdn, a_rdn, a_rdn - a0);
    checks++;
    if (a_rdn - a0 < 3 || gval(alpha) > 2.0 ** -6) begin
      failures++; $display("alpha did not come down from its maximum");
    end
    checks++;
    if (r_back > 1.1 * r_best) begin
      failures++; $display("second optimisation worse than the better fixed configuration");
    end
    checks++;
    if (m.acks_missing != 0) begin failures++; $display("bus bytes not acknowledged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
