// tb_gain_accumulator: self-checking test of one mantissa/exponent gain.
// A reference model kept in the testbench (integer mantissa in 1/16 steps and
// an exponent) is stepped alongside the block with random increase/decrease
// runs, long one-way runs that force renormalisation in both directions and
// saturation at both ends of the beta exponent range, and loads. Mantissa,
// exponent and the event flags are compared every cycle.
module tb_gain_accumulator;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int F = 4;

  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0, en = 1'b0, inc = 1'b0;
  logic [MANT_W-1:0] init_mant = '0;
  logic signed [EXP_W-1:0] init_exp = '0;
  gain_t gain;
  gain_evt_t evt;

  int checks = 0, failures = 0;
  int m_mant, m_exp;           // model: mantissa in 1/2^F units, exponent
  gain_evt_t m_evt;
  int n_up = 0, n_dn = 0, n_shi = 0, n_slo = 0;

  gain_accumulator #(.FRAC_BITS(F), .EXP_MIN(BETA_EXP_MIN), .EXP_MAX(BETA_EXP_MAX),
                     .RST_MANT(32), .RST_EXP(-4)) dut (
    .clk, .rst_n, .load, .init_mant, .init_exp, .en, .inc, .gain, .evt);

  always #5 clk = ~clk;

  task automatic model_step();
    m_evt = '0;
    if (load) begin
      m_mant = int'(init_mant) * 16; m_exp = int'(init_exp);
    end else if (en) begin
      if (inc) begin
        if (m_mant + 1 > 48 * 16) begin
          if (m_exp < BETA_EXP_MAX) begin m_mant = m_mant / 2; m_exp++; m_evt.renorm_up = 1; end
          else begin m_mant = 48 * 16; m_evt.sat_hi = 1; end
        end else m_mant++;
      end else begin
        if (m_mant - 1 < 17 * 16) begin
          if (m_exp > BETA_EXP_MIN) begin m_mant = m_mant * 2; m_exp--; m_evt.renorm_dn = 1; end
          else begin m_mant = 17 * 16; m_evt.sat_lo = 1; end
        end else m_mant--;
      end
    end
  endtask

  task automatic check();
    checks++;
    if (int'(gain.mant) != m_mant / 16 || int'(gain.exp) != m_exp || evt != m_evt) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH t=%0t mant=%0d exp=%0d evt=%b  model mant=%0d exp=%0d evt=%b",
                 $time, gain.mant, gain.exp, evt, m_mant / 16, m_exp, m_evt);
    end
  endtask

  // One clock: drive, step the model, compare after the edge.
  task automatic cycle(input logic l, input logic e, input logic i);
    load = l; en = e; inc = i;
    @(posedge clk);
    model_step();
    #1;
    n_up  += evt.renorm_up; n_dn += evt.renorm_dn;
    n_shi += evt.sat_hi;    n_slo += evt.sat_lo;
    check();
  endtask

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    m_mant = 32 * 16; m_exp = -4; m_evt = '0;
    check();
    // Long run upward: renormalise up to the top exponent, then saturate.
    repeat (3000) cycle(1'b0, 1'b1, 1'b1);
    // Long run downward: all the way to the bottom, then saturate.
    repeat (4000) cycle(1'b0, 1'b1, 1'b0);
    // Load a value and hold with en low.
    init_mant = 6'd40; init_exp = -6'sd2;
    cycle(1'b1, 1'b1, 1'b1);
    repeat (5) cycle(1'b0, 1'b0, 1'b1);
    // Random steps with a bias that changes now and then.
    for (int k = 0; k < 20000; k++) begin
      int bias;
      bias = ((k / 1500) % 2 == 0) ? 60 : 40;
      cycle(1'b0, ($urandom % 8) != 0, ($urandom % 100) < bias);
    end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_shi == 0 || n_slo == 0) begin
      failures++;
      $display("event not seen: up=%0d dn=%0d sat_hi=%0d sat_lo=%0d", n_up, n_dn, n_shi, n_slo);
    end
    $display("renorm up=%0d dn=%0d sat_hi=%0d sat_lo=%0d", n_up, n_dn, n_shi, n_slo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
