// tb_bbpfd: checks the bang-bang PFD model with hand-placed edges: reference
// first (UP), feedback first (DN), edges a few femtoseconds apart, a tie
// (keeps the last decision), and cycle slips where two edges of one input
// arrive before the other input's edge (the extra edge must be ignored, so
// the decision sequence is that of a PFD, not of a nearest-edge detector).
// It also checks that the done strobe rises after each decision, once the
// output is valid, and that bb_dn is the complement of bb_up. These run on
// an ideal instance (offset and hysteresis 0). A second instance with the
// default 30 fs offset and 50 fs hysteresis sees the same edges; after a
// reset it is checked against a model of the threshold rule on hand-picked
// leads around both thresholds and on random leads within +/-100 fs.
module tb_bbpfd;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_ref = 1'b0, clk_fb = 1'b0, rst_n = 1'b1;
  logic bb_up, bb_dn, bb_clk;
  logic [31:0] decisions;
  int checks = 0, failures = 0;
  int strobes = 0;
  logic up_at_strobe;

  bbpfd #(.T_DONE_PS(10.0), .OFFSET_FS(0.0), .HYST_FS(0.0)) dut (
    .clk_ref, .clk_fb, .rst_n, .bb_up, .bb_dn, .bb_clk, .decisions);

  // Default offset and hysteresis.
  logic up2, dn2, clk2;
  logic [31:0] dec2;
  logic m_up;             // model of the second instance's output
  bbpfd dut2 (.clk_ref, .clk_fb, .rst_n, .bb_up(up2), .bb_dn(dn2), .bb_clk(clk2), .decisions(dec2));

  // Pair with lead dt_fs (femtoseconds, reference first when positive),
  // checked against the threshold model: UP above 30-25 fs after UP, above
  // 30+25 fs after DN, unchanged exactly at the threshold.
  task automatic pair2(input int dt_fs, input string what);
    int thr;
    thr = m_up ? 5 : 55;
    if (dt_fs > thr) m_up = 1'b1;
    else if (dt_fs < thr) m_up = 1'b0;
    pair(real'(dt_fs) / 1000.0);
    checks++;
    if (up2 !== m_up || dn2 !== ~m_up) begin
      failures++; $display("offset/hysteresis, %s (lead %0d fs): up=%0b expected %0b", what, dt_fs, up2, m_up);
    end
  endtask

  always @(posedge bb_clk) begin strobes++; up_at_strobe = bb_up; end

  task automatic pulse_ref(); clk_ref = 1'b1; #200; clk_ref = 1'b0; endtask
  task automatic pulse_fb();  clk_fb  = 1'b1; #200; clk_fb  = 1'b0; endtask

  // Reference edge at 0, feedback edge at dt (ps, may be negative).
  task automatic pair(input real dt);
    if (dt >= 0.0) begin
      fork
        pulse_ref();
        begin #(dt); pulse_fb(); end
      join
    end else begin
      fork
        pulse_fb();
        begin #(-dt); pulse_ref(); end
      join
    end
    #500;
  endtask

  task automatic expect_dec(input logic up, input int n_dec, input string what);
    checks++;
    if (bb_up !== up || bb_dn !== ~up || decisions != 32'(n_dec) || strobes != n_dec || up_at_strobe !== up) begin
      failures++;
      $display("%s: bb_up=%0b bb_dn=%0b decisions=%0d strobes=%0d (expected up=%0b n=%0d)",
               what, bb_up, bb_dn, decisions, strobes, up, n_dec);
    end
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #100;
    checks++;
    if (bb_up !== 1'b0 || bb_dn !== 1'b1) begin failures++; $display("reset state wrong"); end
    rst_n = 1'b1;
    #100;
    strobes = 0;
    pair(20.0);    expect_dec(1'b1, 1, "ref 20 ps early");
    pair(-20.0);   expect_dec(1'b0, 2, "fb 20 ps early");
    pair(0.005);   expect_dec(1'b1, 3, "ref 5 fs early");
    pair(-0.005);  expect_dec(1'b0, 4, "fb 5 fs early");
    pair(0.0);     expect_dec(1'b0, 5, "tie keeps DN");
    pair(1.0);     expect_dec(1'b1, 6, "ref 1 ps early");
    pair(0.0);     expect_dec(1'b1, 7, "tie keeps UP");
    // Cycle slip, reference fast: ref, ref, fb -> one UP; the second ref is ignored.
    pulse_ref(); #300; pulse_ref(); #300; pulse_fb(); #500;
    expect_dec(1'b1, 8, "slip ref-ref-fb");
    // Now the feedback edge comes next: it arms; a later ref edge then gives DN.
    pulse_fb(); #300; pulse_fb(); #300; pulse_ref(); #500;
    expect_dec(1'b0, 9, "slip fb-fb-ref");
    // Strobe timing: output must be valid before the strobe rises.
    fork
      pulse_ref();
      begin #50; clk_fb = 1'b1; #5; checks++;
        if (bb_clk !== 1'b0 || bb_up !== 1'b1) begin failures++; $display("strobe came too early"); end
        #10; checks++;
        if (bb_clk !== 1'b1) begin failures++; $display("strobe did not rise"); end
        #100; clk_fb = 1'b0; end
    join
    #500;
    expect_dec(1'b1, 10, "strobe timing case");
    // Offset and hysteresis (second instance), from reset (DN).
    rst_n = 1'b0; #100; rst_n = 1'b1; #100;
    m_up = 1'b0;
    pair2(40, "inside the window after DN");
    pair2(60, "above the upper threshold");
    pair2(10, "inside the window after UP");
    pair2(3,  "below the lower threshold");
    pair2(55, "at the upper threshold after DN");
    pair2(56, "just above the upper threshold");
    pair2(5,  "at the lower threshold after UP");
    pair2(-10, "feedback first");
    pair2(0,  "simultaneous edges");
    for (int i = 0; i < 200; i++) pair2(int'($urandom_range(200)) - 100, "random lead");
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
