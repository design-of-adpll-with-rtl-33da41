// divider: the PLL feedback divider, a ripple chain of STAGES divide-by-two
// flip-flops (five stages, grouped in the thesis as /4, /4 and /2) that
// divides the oscillator clock by 2^STAGES = 32.
//
// Each stage is clocked by the output of the one before, so the output edge
// follows the input edge after STAGES clock-to-output delays (zero in this
// RTL). After reset all stages are 0, so clk_div rises on the first rising
// edge of clk_in and then on every 2^STAGES-th one, with a 50% duty cycle.
module divider #(
  parameter int STAGES = 5
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_div
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [STAGES:0] ck;

  assign ck[0] = clk_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    div2 u_div2 (.clk_in(ck[i]), .rst_n, .q(ck[i+1]));
  end

  assign clk_div  = ck[STAGES];

endmodule
