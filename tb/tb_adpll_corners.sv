// tb_adpll_corners: the PLL at the slow and fast process corners of its
// oscillator (1.61-3.62 GHz and 2.21-4.38 GHz over the 10-bit code, against
// 1.9-4.05 GHz typical). Both start from reset (code 512, both gains
// adapting) on the same 100 MHz reference and must lock to 3.2 GHz: after
// 30000 reference cycles, 32 x 2000 output edges (within 2) and no slips
// over a 2000-cycle window, and an integral code within 6 of the value the
// linear oscillator law gives for 3.2 GHz (809.3 slow, 466.7 fast).
module tb_adpll_corners;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NC = 2;
  localparam real FMIN [NC] = '{1.61e9, 2.21e9};
  localparam real FMAX [NC] = '{3.62e9, 4.38e9};
  localparam string NAME [NC] = '{"slow corner", "fast corner"};

  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic [NC-1:0] clk_out;
  logic [31:0] decisions [NC];
  logic [CODE_W-1:0] code [NC];
  int checks = 0, failures = 0;
  longint n_out [NC];
  int n_slip [NC];

  always #5000 ref_clk = ~ref_clk;

  for (genvar c = 0; c < NC; c++) begin : g_pll
    logic sda_oe, clk_fb, bb_up, bb_dn, code_sat;
    gain_t beta, alpha;
    gain_evt_t beta_evt, alpha_evt;
    logic signed [PROP_W-1:0] prop;
    logic [THERM_W-1:0] row, col;
    logic [31:0] last_dec;

    // The I2C bus is idle (both lines high): the PLL runs on its reset setup.
    adpll_top #(.F_MIN_HZ(FMIN[c]), .F_MAX_HZ(FMAX[c])) dut (
      .ref_clk, .rst_n, .scl(1'b1), .sda_in(1'b1), .sda_oe, .clk_out(clk_out[c]), .clk_fb,
      .bb_up, .bb_dn, .beta, .alpha, .beta_evt, .alpha_evt, .code(code[c]), .code_sat,
      .prop, .row, .col, .decisions(decisions[c]));

    initial begin n_out[c] = 0; n_slip[c] = 0; last_dec = '0; end
    always @(posedge clk_out[c]) n_out[c]++;
    always @(negedge ref_clk) if (rst_n) begin
      if (decisions[c] == last_dec) n_slip[c]++;
      last_dec = decisions[c];
    end
  end

  initial begin
    longint o0 [NC];
    int s0 [NC];
    real target;
    #1000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    repeat (30000) @(posedge ref_clk);
    for (int c = 0; c < NC; c++) begin o0[c] = n_out[c]; s0[c] = n_slip[c]; end
    repeat (2000) @(posedge ref_clk);
    for (int c = 0; c < NC; c++) begin
      target = 1023.0 * (3.2e9 - FMIN[c]) / (FMAX[c] - FMIN[c]);
      $display("%s: %0d output edges in 2000 cycles, %0d slips, code %0d (3.2 GHz at %0.1f)",
               NAME[c], n_out[c] - o0[c], n_slip[c] - s0[c], code[c], target);
      checks++;
      if (n_out[c] - o0[c] < 63998 || n_out[c] - o0[c] > 64002 || n_slip[c] != s0[c]) begin
        failures++; $display("%s: not locked", NAME[c]);
      end
      checks++;
      if (real'(code[c]) - target > 6.0 || target - real'(code[c]) > 6.0) begin
        failures++; $display("%s: code away from the 3.2 GHz value", NAME[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
