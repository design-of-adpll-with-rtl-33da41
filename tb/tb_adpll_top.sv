// tb_adpll_top: end-to-end test of the whole PLL at its default parameters
// (100 MHz reference, divide by 32, 3.2 GHz target, oscillator phase noise
// -90.5 dBc/Hz at 1 MHz), configured only through its I2C port (1 MHz SCL).
//
// Phase 1, acquisition: out of reset the code is 512 (about 2.98 GHz) and
// both gains adapt from their smallest values. The PLL must lock: over a
// 2000-cycle window the oscillator must give 32 x 2000 edges (within 2, the
// counting resolution) and no reference cycle may pass without a completed
// comparison. During acquisition beta must rise to its ceiling and alpha
// must rise from 17*2^-20 to at least 1/8 code LSB, and after lock beta must
// come back down.
// Phase 2, optimisation off (CTRL write): both gains are loaded from the init
// registers and must stay there while the PLL stays locked; the status
// registers read back over I2C must match.
// Phase 3, beta adapting with alpha fixed small and then fixed large (the
// two comparison configurations): the PLL must stay locked. Then alpha adapts
// again, starting from the large value, and must come down.
// Phase 4, code load: the integral code is forced to 600 through the init
// code registers and CTRL.load_code, must read 600, and after release the
// PLL must lock again.
// Throughout, every mechanism is counted and each must occur at least once:
// UP and DN decisions, cycle slips (a reference cycle, counted between falling
// edges, without a completed comparison), mantissa renormalisation up and
// down for beta and up for alpha, beta saturation at the top, optimiser mode
// switches, register writes and reads with every byte acknowledged, and the
// code load. (At these defaults alpha settles in the 2^-5 octave, so its
// downward renormalisation is only reported here.)
module tb_adpll_top;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [6:0] DEV = 7'h52;
  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic scl, m_oe, s_oe, sda;
  gain_t beta_init, alpha_init, beta, alpha;
  gain_evt_t beta_evt, alpha_evt;
  logic clk_out, clk_fb, bb_up, bb_dn, code_sat;
  logic [CODE_W-1:0] code;
  logic signed [PROP_W-1:0] prop;
  logic [THERM_W-1:0] row, col;
  logic [31:0] decisions;

  assign sda = ~(m_oe | s_oe);     // open-drain bus with pull-up

  adpll_top dut (
    .ref_clk, .rst_n, .scl, .sda_in(sda), .sda_oe(s_oe), .clk_out, .clk_fb, .bb_up, .bb_dn, .beta, .alpha,
    .beta_evt, .alpha_evt, .code, .code_sat, .prop, .row, .col, .decisions);

  i2c_master #(.T_Q_PS(250000.0)) m (.scl, .sda_oe(m_oe), .sda);

  always #5000 ref_clk = ~ref_clk;     // 100 MHz

  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_slip = 0, n_mode = 0, n_wr = 0, n_rd = 0, n_load = 0;
  int b_rup = 0, b_rdn = 0, b_shi = 0, b_slo = 0, a_rup = 0, a_rdn = 0, a_shi = 0, a_slo = 0;
  longint n_out = 0;
  logic [31:0] last_dec = '0;

  always @(posedge clk_out) n_out++;

  // Per reference cycle bookkeeping, half a cycle away from the compared edges.
  always @(negedge ref_clk) if (rst_n) begin
    if (decisions == last_dec) n_slip++;
    last_dec = decisions;
  end

  // Each completed comparison: sample after the loop filter has acted on it.
  always @(decisions) if (rst_n) begin
    #20;
    if (bb_up) n_up++; else n_dn++;
    b_rup += beta_evt.renorm_up;  b_rdn += beta_evt.renorm_dn;
    b_shi += beta_evt.sat_hi;     b_slo += beta_evt.sat_lo;
    a_rup += alpha_evt.renorm_up; a_rdn += alpha_evt.renorm_dn;
    a_shi += alpha_evt.sat_hi;    a_slo += alpha_evt.sat_lo;
  end

  // Register writes through the bus.
  task automatic set_ctrl(input logic load, input logic a_en, input logic b_en);
    m.write_regs(DEV, REG_CTRL, 1, {29'd0, load, a_en, b_en});
    n_wr++;
  endtask

  task automatic set_gain(input logic [7:0] ptr, input gain_t g);
    m.write_regs(DEV, ptr, 2, {16'd0, 8'(signed'(g.exp)), 8'(g.mant)});
    n_wr++;
  endtask

  function automatic real gval(gain_t g);
    return real'(g.mant) * (2.0 ** real'(g.exp));
  endfunction

  // Measure frequency and UP share over n reference cycles.
  task automatic window(input int n, output longint edges, output int slips, output real up_share);
    longint o0; int u0, d0, s0;
    @(posedge ref_clk);
    o0 = n_out; u0 = n_up; d0 = n_dn; s0 = n_slip;
    repeat (n) @(posedge ref_clk);
    edges = n_out - o0;
    slips = n_slip - s0;
    up_share = real'(n_up - u0) / real'((n_up - u0) + (n_dn - d0));
  endtask

  task automatic check_lock(input string what);
    longint e; int sl; real u;
    window(2000, e, sl, u);
    checks++;
    if (e < 32 * 2000 - 2 || e > 32 * 2000 + 2 || sl != 0) begin
      failures++;
      $display("%s: not locked, %0d output edges in 2000 reference cycles, %0d slips", what, e, sl);
    end else
      $display("%s: locked, %0d output edges in 2000 cycles, UP share %f, beta=%0d*2^%0d alpha=%0d*2^%0d code=%0d",
               what, e, u, beta.mant, beta.exp, alpha.mant, alpha.exp, code);
  endtask

  initial begin
    real bpeak, apeak;
    int lock_cycle;
    logic [31:0] rd;
    beta_init.mant = 6'd17;  beta_init.exp = -6'sd7;
    alpha_init.mant = 6'd17; alpha_init.exp = -6'sd20;
    #1000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    repeat (3) @(posedge ref_clk);
    checks++;
    if (beta != beta_init || alpha != alpha_init || code < 10'd511 || code > 10'd512) begin
      failures++; $display("start-up gains or code wrong");
    end
    // Phase 1: acquisition with both gains adapting (reset configuration).
    bpeak = 0.0; apeak = 0.0; lock_cycle = -1;
    for (int k = 0; k < 30000; k++) begin
      @(posedge ref_clk);
      if (gval(beta) > bpeak) bpeak = gval(beta);
      if (gval(alpha) > apeak) apeak = gval(alpha);
      if (lock_cycle < 0 && k % 500 == 0 && code > 10'd600 && code < 10'd640 && gval(beta) < 1.0)
        lock_cycle = k;
    end
    $display("beta peak %f, alpha peak %f, lock (code near target, beta < 1) after %0d cycles",
             bpeak, apeak, lock_cycle);
    checks++;
    if (apeak < 0.125) begin failures++; $display("alpha did not rise during acquisition"); end
    checks++;
    if (bpeak < 96.0) begin failures++; $display("beta did not reach its ceiling during acquisition"); end
    checks++;
    if (lock_cycle < 0 || gval(beta) > bpeak / 8.0) begin
      failures++; $display("beta did not come down after lock (now %f)", gval(beta));
    end
    check_lock("both gains adapting");

    // Phase 2: optimisation off, gains fixed at the init registers.
    beta_init.mant = 6'd24;  beta_init.exp = -6'sd6;
    alpha_init.mant = 6'd20; alpha_init.exp = -6'sd12;
    set_gain(REG_BETA_MANT, beta_init);
    set_gain(REG_ALPHA_MANT, alpha_init);
    set_ctrl(1'b0, 1'b0, 1'b0); n_mode++;
    repeat (2000) @(posedge ref_clk);
    check_lock("fixed gains");
    checks++;
    if (beta != beta_init || alpha != alpha_init) begin failures++; $display("gains not held"); end
    m.read_regs(DEV, REG_ST_BMANT, 4, rd); n_rd++;
    checks++;
    if (rd !== {8'(signed'(alpha_init.exp)), 8'(alpha_init.mant), 8'(signed'(beta_init.exp)), 8'(beta_init.mant)}) begin
      failures++; $display("status gains read %h", rd);
    end
    m.read_regs(DEV, REG_ST_CODE_LO, 2, rd); n_rd++;
    checks++;
    if (rd[15:10] != 0 || rd[9:0] < code - 10'd3 || rd[9:0] > code + 10'd3) begin
      failures++; $display("status code read %0d, code now %0d", rd[15:0], code);
    end

    // Phase 3a: beta adapting, alpha fixed small.
    alpha_init.mant = 6'd17; alpha_init.exp = -6'sd20;
    set_gain(REG_ALPHA_MANT, alpha_init);
    set_ctrl(1'b0, 1'b0, 1'b1); n_mode++;
    repeat (3000) @(posedge ref_clk);
    check_lock("beta adapting, alpha small");
    checks++;
    if (alpha != alpha_init) begin failures++; $display("alpha not held"); end
    // Phase 3b: beta adapting, alpha fixed large (its largest value).
    alpha_init.mant = 6'd48; alpha_init.exp = -6'sd5;
    set_gain(REG_ALPHA_MANT, alpha_init);
    repeat (3000) @(posedge ref_clk);
    check_lock("beta adapting, alpha large");

    // Back to full adaptation.
    set_ctrl(1'b0, 1'b1, 1'b1); n_mode++;
    repeat (6000) @(posedge ref_clk);
    check_lock("both gains adapting again");
    checks++;
    if (gval(alpha) >= 1.5) begin failures++; $display("alpha did not come down from its maximum"); end

    // Phase 4: force the integral code, then release it.
    m.write_regs(DEV, REG_CODE_LO, 2, {16'd0, 16'd600}); n_wr++;
    set_ctrl(1'b1, 1'b1, 1'b1);
    repeat (20) @(posedge ref_clk);
    checks++;
    if (code != 10'd600) begin failures++; $display("code load gave %0d", code); end
    else n_load++;
    set_ctrl(1'b0, 1'b1, 1'b1);
    repeat (5000) @(posedge ref_clk);
    check_lock("after code load");
    checks++;
    if (m.acks_missing != 0) begin failures++; $display("%0d bus bytes not acknowledged", m.acks_missing); end

    $display("decisions UP=%0d DN=%0d slips=%0d", n_up, n_dn, n_slip);
    $display("beta  renorm up=%0d dn=%0d sat hi=%0d lo=%0d", b_rup, b_rdn, b_shi, b_slo);
    $display("alpha renorm up=%0d dn=%0d sat hi=%0d lo=%0d", a_rup, a_rdn, a_shi, a_slo);
    $display("mode switches=%0d, register writes=%0d reads=%0d, code loads=%0d", n_mode, n_wr, n_rd, n_load);
    checks++;
    if (n_up == 0 || n_dn == 0 || n_slip == 0 || b_rup == 0 || b_rdn == 0 || b_shi == 0 ||
        a_rup == 0 || n_mode < 3 || n_wr == 0 || n_rd == 0 || n_load == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000000;   // 3 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
