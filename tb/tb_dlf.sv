// tb_dlf: self-checking test of the loop filter. A testbench model computes
// the proportional output +/- beta_mant * 2^(beta_exp + 7) and the integral
// accumulator in 2^-20 units (with saturation at 0 and 1024 - 2^-20) from
// random decisions and random gains over their whole ranges, and the block's
// prop, code and saturation flag are compared every cycle. Long one-sided
// runs drive the integral path into both rails; a code load is checked too.
// The output latency of one clock is checked by the comparison itself.
module tb_dlf;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, bb_up = 1'b0, load_code = 1'b0;
  logic [CODE_W-1:0] init_code = '0;
  gain_t beta, alpha;
  logic signed [PROP_W-1:0] prop;
  logic [CODE_W-1:0] code;
  logic code_sat;

  int checks = 0, failures = 0;
  longint m_acc;       // model accumulator, 2^-20 code units
  longint m_prop;      // model proportional output, 2^-7 code units
  bit     m_sat;
  int     n_sat_hi = 0, n_sat_lo = 0;
  localparam longint ACC_MAX = (longint'(1) << 30) - 1;

  dlf #(.RST_CODE(512)) dut (.clk, .rst_n, .bb_up, .beta, .alpha, .load_code, .init_code,
                             .prop, .code, .code_sat);

  always #5 clk = ~clk;

  task automatic rand_gains();
    beta.mant  = 6'(17 + $urandom % 32);
    beta.exp   = 6'(BETA_EXP_MIN + int'($urandom % 9));
    alpha.mant = 6'(17 + $urandom % 32);
    alpha.exp  = 6'(ALPHA_EXP_MIN + int'($urandom % 16));
  endtask

  task automatic cycle(input logic y, input logic ld);
    longint a;
    bb_up = y; load_code = ld;
    @(posedge clk);
    m_prop = longint'(beta.mant) << (int'(beta.exp) + 7);
    if (!y) m_prop = -m_prop;
    a = longint'(alpha.mant) << (int'(alpha.exp) + 20);
    m_sat = 0;
    if (ld) m_acc = longint'(init_code) << 20;
    else if (y) begin
      m_acc += a; if (m_acc > ACC_MAX) begin m_acc = ACC_MAX; m_sat = 1; n_sat_hi++; end
    end else begin
      m_acc -= a; if (m_acc < 0) begin m_acc = 0; m_sat = 1; n_sat_lo++; end
    end
    #1;
    checks++;
    if (longint'(prop) != m_prop || longint'(code) != (m_acc >> 20) || code_sat != m_sat) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH t=%0t prop=%0d (model %0d) code=%0d (model %0d) sat=%0b (model %0b)",
                 $time, prop, m_prop, code, m_acc >> 20, code_sat, m_sat);
    end
  endtask

  initial begin
    beta.mant = 6'd17; beta.exp = -6'sd7; alpha.mant = 6'd17; alpha.exp = -6'sd20;
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    m_acc = longint'(512) << 20;
    checks++;
    if (code != 10'd512 || prop != 0) begin failures++; $display("reset values wrong"); end
    // Random decisions and gains.
    for (int k = 0; k < 20000; k++) begin
      if (k % 50 == 0) rand_gains();
      cycle(1'($urandom), 1'b0);
    end
    // Large alpha, one-sided runs into both rails.
    alpha.mant = 6'd48; alpha.exp = -6'sd5;
    repeat (800) cycle(1'b1, 1'b0);
    repeat (800) cycle(1'b0, 1'b0);
    // Load a code.
    init_code = 10'd619;
    cycle(1'b1, 1'b1);
    repeat (50) cycle(1'($urandom), 1'b0);
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("rails not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
