// tb_divider: checks the ripple divide-by-32 feedback divider. It counts the
// input rising edges between output rising edges (must be 32), checks a 50%
// duty cycle (16 input edges high, 16 low), that the first output edge comes
// with the first input edge after reset, and that reset stops and clears it.
module tb_divider;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_in = 1'b0, rst_n = 1'b1, clk_div;
  int checks = 0, failures = 0;
  int n_in = 0, last_rise = -1, n_rises = 0, high_cnt = 0;

  divider #(.STAGES(5)) dut (.clk_in, .rst_n, .clk_div);

  always #156 clk_in = ~clk_in;     // about 3.2 GHz

  always @(posedge clk_in) if (rst_n) begin
    n_in++;
    #1;
    if (clk_div) high_cnt++;
  end

  always @(posedge clk_div) begin
    n_rises++;
    checks++;
    if (last_rise < 0) begin
      if (n_in != 1) begin failures++; $display("first output edge on input edge %0d", n_in); end
    end else if (n_in - last_rise != 32) begin
      failures++; $display("output period %0d input edges", n_in - last_rise);
    end
    last_rise = n_in;
  end

  initial begin
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    repeat (32 * 50) @(posedge clk_in);
    #2;
    checks++;
    if (high_cnt != 16 * 50) begin failures++; $display("high for %0d of %0d edges", high_cnt, 32 * 50); end
    checks++;
    if (n_rises != 50) begin failures++; $display("%0d output edges, expected 50", n_rises); end
    rst_n = 1'b0;
    #1;
    checks++;
    if (clk_div != 1'b0) begin failures++; $display("reset does not clear the output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
