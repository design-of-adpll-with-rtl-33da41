// div2: one divide-by-two stage of the feedback divider, a flip-flop whose
// inverted output is fed back to its input, clocked by the previous stage.
// `q` toggles on every rising edge of `clk_in`; reset (asynchronous, active
// low) clears it so the divided clocks start in a known phase (the reset is
// this design's addition).
module div2 (
  input  logic clk_in,
  input  logic rst_n,
  output logic q
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ~q;
  end

endmodule
