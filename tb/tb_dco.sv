// tb_dco: checks the oscillator model. With noise off it drives the row and
// column codes for a set of 10-bit codes (built in the testbench from the
// published thermometer mapping) plus proportional inputs, measures the
// average frequency over 2000 periods and compares it with
//   f = 1.9 GHz + (code + prop/128) * (4.05 GHz - 1.9 GHz) / 1023.
// A second instance with the default -90.5 dBc/Hz phase noise is run at a
// fixed code and its measured period jitter is compared with the value that
// phase noise implies (sigma = sqrt(c*T), c = 10^(PN/10) * 1e12 / f^2).
module tb_dco;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic [THERM_W-1:0] row, col;
  logic signed [PROP_W-1:0] prop;
  logic clk_q, clk_n;
  int checks = 0, failures = 0;

  dco #(.PN_1MHZ_DBC(0.0))   u_quiet (.row, .col, .prop, .clk_out(clk_q));
  dco #(.PN_1MHZ_DBC(-90.5)) u_noisy (.row, .col, .prop, .clk_out(clk_n));

  task automatic set_code(input int c);
    int c6;
    row = (31'(1) << (c / 32)) - 31'(1);
    if (c / 32 == 31) row = 31'h7FFF_FFFF;
    c6 = c % 64;
    col = (c6 < 32) ? (31'(1) << c6) - 31'(1) : 31'h7FFF_FFFF & ~((31'(1) << (c6 - 32)) - 31'(1));
  endtask

  task automatic measure_q(input int c, input int p);
    realtime t0, t1;
    real f, fexp;
    set_code(c); prop = PROP_W'(p);
    repeat (3) @(posedge clk_q);
    t0 = $realtime;
    repeat (2000) @(posedge clk_q);
    t1 = $realtime;
    f = 2000.0 / (t1 - t0) * 1.0e12;
    fexp = 1.9e9 + (real'(c) + real'(p) / 128.0) * (4.05e9 - 1.9e9) / 1023.0;
    checks++;
    if ((f - fexp) / fexp > 1.0e-5 || (fexp - f) / fexp > 1.0e-5) begin
      failures++;
      $display("code %0d prop %0d: f=%f MHz expected %f MHz", c, p, f / 1.0e6, fexp / 1.0e6);
    end
  endtask

  initial begin
    realtime tp;
    real s1, s2, d, mean, sd, sexp, f;
    int n;
    measure_q(0, 0);
    measure_q(1023, 0);
    measure_q(619, 0);
    measure_q(31, 0);
    measure_q(32, 0);
    measure_q(33, 0);
    measure_q(500, 1000);
    measure_q(500, -1000);
    measure_q(700, 17);
    // Jitter of the noisy instance at code 619.
    set_code(619); prop = '0;
    repeat (3) @(posedge clk_n);
    tp = $realtime; s1 = 0.0; s2 = 0.0; n = 20000;
    for (int k = 0; k < n; k++) begin
      @(posedge clk_n);
      d = $realtime - tp; tp = $realtime;
      s1 += d; s2 += d * d;
    end
    mean = s1 / n;
    sd = $sqrt(s2 / n - mean * mean);
    f = 1.0e12 / mean;
    sexp = 1.0e12 * $sqrt((10.0 ** (-9.05)) * 1.0e12 / (f * f) / f);
    $display("period %f ps, jitter %f fs rms, expected %f fs", mean, sd * 1.0e3, sexp * 1.0e3);
    checks++;
    if (sd < 0.8 * sexp || sd > 1.2 * sexp) begin failures++; $display("period jitter off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
