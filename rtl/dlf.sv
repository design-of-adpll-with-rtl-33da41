// dlf: digital loop filter of the bang-bang ADPLL, with a direct proportional
// path and an integral path that drive the oscillator separately.
//
// Once per reference cycle it takes the BBPFD decision y (bb_up = 1 means +1,
// the oscillator is slow; 0 means -1) and the current gains in mantissa/
// exponent form, beta = beta.mant * 2^beta.exp and alpha = alpha.mant *
// 2^alpha.exp. The two gain stages are a multiply by the mantissa and a shift
// by the exponent, as in the thesis.
//   proportional path: prop = +/- beta, registered, no memory;
//   integral path:     acc  = acc +/- alpha, registered and saturated to the
//                      10-bit oscillator code range.
// There is no adder joining the two: prop goes straight to the oscillator's
// fine (proportional) input and the integer part of acc is the 10-bit code
// that is decoded into the resistor array's row and column codes. Both paths
// have the same single register of latency.
//
// Number formats (this design's choice; the thesis gives only the gain ranges):
//   prop     signed, LSB = 2^-PROP_FRAC (2^-7) oscillator code LSB, so beta
//            from 17*2^-7 to 48*2^1 is exact;
//   acc      unsigned 10.20 fixed point, LSB = 2^-20 code LSB, so alpha from
//            17*2^-20 to 48*2^-5 is exact.
// `load_code` sets the integral accumulator to init_code (start-up code or a
// manual override); reset sets it to RST_CODE.
module dlf
  import adpll_pkg::*;
#(
  parameter int RST_CODE = 512
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        bb_up,
  input  gain_t                       beta,
  input  gain_t                       alpha,
  input  logic                        load_code,
  input  logic [CODE_W-1:0]           init_code,
  output logic signed [PROP_W-1:0]    prop,
  output logic [CODE_W-1:0]           code,
  output logic                        code_sat    // integral path at a rail this cycle
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int ACC_W = CODE_W + INT_FRAC;

  logic [PROP_W-2:0]  beta_mag;     // beta in units of 2^-PROP_FRAC
  logic [ALPHA_W-1:0] alpha_mag;    // alpha in units of 2^-INT_FRAC
  logic [ACC_W-1:0]   acc_q;
  logic [ACC_W:0]     acc_sum;      // one extra bit for the carry / borrow
  logic [ACC_W-1:0]   acc_d;
  logic               sat_d;
  logic [EXP_W-1:0]   bsh, ash;     // shift amounts, exponent minus its minimum

  // Gain stages: mantissa multiply then exponent shift. An exponent below its
  // range is treated as the minimum.
  always_comb begin
    bsh = beta.exp  - EXP_W'(BETA_EXP_MIN);
    ash = alpha.exp - EXP_W'(ALPHA_EXP_MIN);
    if ($signed(bsh) < 0) bsh = '0;
    if ($signed(ash) < 0) ash = '0;
    beta_mag  = (PROP_W-1)'(beta.mant)  << bsh;
    alpha_mag = ALPHA_W'(alpha.mant)    << ash;
  end

  // Integral path with saturation at 0 and at the top code.
  always_comb begin
    sat_d = 1'b0;
    if (bb_up) begin
      acc_sum = {1'b0, acc_q} + (ACC_W+1)'(alpha_mag);
      if (acc_sum[ACC_W]) begin
        acc_d = '1;
        sat_d = 1'b1;
      end else begin
        acc_d = acc_sum[ACC_W-1:0];
      end
    end else begin
      acc_sum = {1'b0, acc_q} - (ACC_W+1)'(alpha_mag);
      if (acc_sum[ACC_W]) begin
        acc_d = '0;
        sat_d = 1'b1;
      end else begin
        acc_d = acc_sum[ACC_W-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= ACC_W'(RST_CODE) << INT_FRAC;
      prop     <= '0;
      code_sat <= 1'b0;
    end else begin
      prop     <= bb_up ? $signed({1'b0, beta_mag}) : -$signed({1'b0, beta_mag});
      code_sat <= load_code ? 1'b0 : sat_d;
      acc_q    <= load_code ? ({init_code, {INT_FRAC{1'b0}}}) : acc_d;
    end
  end

  assign code = acc_q[ACC_W-1:INT_FRAC];

endmodule
