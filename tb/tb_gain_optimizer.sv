// tb_gain_optimizer: self-checking test of the lag-1 / lag-2 sign
// correlators driving beta and alpha. The testbench keeps its own history of
// the decisions and its own mantissa/exponent models of both gains, feeds
// decision streams with different statistics (long runs, alternation,
// period-4 patterns, random), and compares both gains every cycle. It also
// checks the hold-at-init behaviour of each enable and that a period-2
// alternation lowers beta while a run of equal decisions raises both gains.
module tb_gain_optimizer;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, bb_up = 1'b0;
  logic opt_beta_en = 1'b0, opt_alpha_en = 1'b0;
  gain_t beta_init, alpha_init, beta, alpha;
  gain_evt_t beta_evt, alpha_evt;

  int checks = 0, failures = 0;

  typedef struct { int mant; int e; int emin; int emax; } mg_t;  // mant in 1/16
  mg_t mb, ma;
  logic h1, h2;
  int   nfill;

  gain_optimizer #(.BETA_FRAC(4), .ALPHA_FRAC(4)) dut (
    .clk, .rst_n, .bb_up, .opt_beta_en, .opt_alpha_en, .beta_init, .alpha_init,
    .beta, .alpha, .beta_evt, .alpha_evt);

  always #5 clk = ~clk;

  function automatic mg_t step(mg_t g, bit up);
    if (up) begin
      if (g.mant + 1 > 48 * 16) begin
        if (g.e < g.emax) begin g.mant = g.mant / 2; g.e++; end else g.mant = 48 * 16;
      end else g.mant++;
    end else begin
      if (g.mant - 1 < 17 * 16) begin
        if (g.e > g.emin) begin g.mant = g.mant * 2; g.e--; end else g.mant = 17 * 16;
      end else g.mant--;
    end
    return g;
  endfunction

  task automatic cycle(input logic y);
    bb_up = y;
    @(posedge clk);
    if (!opt_beta_en)       begin mb.mant = int'(beta_init.mant) * 16; mb.e = int'(beta_init.exp); end
    else if (nfill >= 1)    mb = step(mb, y == h1);
    if (!opt_alpha_en)      begin ma.mant = int'(alpha_init.mant) * 16; ma.e = int'(alpha_init.exp); end
    else if (nfill >= 2)    ma = step(ma, y == h2);
    h2 = h1; h1 = y;
    if (nfill < 2) nfill++;
    #1;
    checks++;
    if (int'(beta.mant) != mb.mant / 16 || int'(beta.exp) != mb.e ||
        int'(alpha.mant) != ma.mant / 16 || int'(alpha.exp) != ma.e) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH t=%0t beta=%0d*2^%0d (model %0d*2^%0d) alpha=%0d*2^%0d (model %0d*2^%0d)",
                 $time, beta.mant, beta.exp, mb.mant / 16, mb.e, alpha.mant, alpha.exp, ma.mant / 16, ma.e);
    end
  endtask

  function automatic real gval(gain_t g);
    return real'(g.mant) * (2.0 ** real'(g.exp));
  endfunction

  initial begin
    real b0, a0;
    beta_init.mant = 6'd20;  beta_init.exp = -6'sd3;
    alpha_init.mant = 6'd40; alpha_init.exp = -6'sd12;
    mb = '{17 * 16, -7, BETA_EXP_MIN, BETA_EXP_MAX};
    ma = '{17 * 16, -20, ALPHA_EXP_MIN, ALPHA_EXP_MAX};
    h1 = 0; h2 = 0; nfill = 0;
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    // Both disabled: gains held at the init values.
    repeat (4) cycle(1'($urandom));
    opt_beta_en = 1'b1; opt_alpha_en = 1'b1;
    // Long run of UP: both correlations positive, both gains rise.
    b0 = gval(beta); a0 = gval(alpha);
    repeat (600) cycle(1'b1);
    checks++;
    if (!(gval(beta) > b0 && gval(alpha) > a0)) begin
      failures++; $display("run of UP did not raise both gains");
    end
    // Alternation: lag-1 negative (beta falls), lag-2 positive (alpha rises).
    b0 = gval(beta); a0 = gval(alpha);
    for (int k = 0; k < 600; k++) cycle(1'(k % 2));
    checks++;
    if (!(gval(beta) < b0 && gval(alpha) > a0)) begin
      failures++; $display("alternation did not lower beta and raise alpha");
    end
    // Period-4 pattern UUDD: lag-1 averages zero, lag-2 negative (alpha falls).
    a0 = gval(alpha); b0 = gval(beta);
    for (int k = 0; k < 800; k++) cycle(1'((k / 2) % 2));
    checks++;
    if (!(gval(alpha) < a0 && gval(beta) == b0)) begin
      failures++; $display("period-4 pattern did not lower alpha only");
    end
    // Random decisions, with beta adaptation switched off for a while.
    for (int k = 0; k < 5000; k++) begin
      if (k == 2000) opt_beta_en = 1'b0;
      if (k == 3000) opt_beta_en = 1'b1;
      if (k == 3500) opt_alpha_en = 1'b0;
      if (k == 4200) opt_alpha_en = 1'b1;
      cycle(1'($urandom));
    end
    $display("final beta=%0d*2^%0d alpha=%0d*2^%0d", beta.mant, beta.exp, alpha.mant, alpha.exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
