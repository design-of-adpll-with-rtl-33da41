// gain_accumulator: one adaptive loop gain in mantissa-and-exponent form.
//
// The accumulator of the gain optimiser and the mantissa/exponent gain stage
// are one register here: the accumulated value *is* the gain, so a positive
// correlation sample raises the gain and a negative one lowers it, in
// proportion to the accumulated count. Each enabled cycle adds +1 or -1 in
// the last of FRAC_BITS fractional mantissa bits.
//
// When the mantissa would fall below MANT_MIN (17) it is doubled instead and
// the exponent is decremented; when it would rise above MANT_MAX (48) it is
// halved and the exponent incremented. 17 doubles to 34 and 48 halves to 24,
// so the rest of the 17..48 range is margin before the next renormalisation.
// At the end of the exponent range the mantissa stops at its limit. The
// ranges and the renormalisation rule follow the thesis; the fractional
// step size and the exact moment of renormalisation are this design's choice.
//
// Interface: `load` (synchronous, overrides `en`) sets mantissa and exponent
// to init_mant / init_exp, for the start-up gains or for the fixed gains used
// when optimisation is off. `en` with `inc` steps the gain. `gain` is the
// integer mantissa and the exponent, registered; `evt` flags for one cycle
// what the last step did. Reset (asynchronous, active low) loads RST_MANT and
// RST_EXP.
module gain_accumulator
  import adpll_pkg::*;
#(
  parameter int FRAC_BITS = 4,
  parameter int EXP_MIN   = BETA_EXP_MIN,
  parameter int EXP_MAX   = BETA_EXP_MAX,
  parameter int RST_MANT  = 32,
  parameter int RST_EXP   = -4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [MANT_W-1:0]        init_mant,
  input  logic signed [EXP_W-1:0]  init_exp,
  input  logic                     en,
  input  logic                     inc,
  output gain_t                    gain,
  output gain_evt_t                evt
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int MW = MANT_W + FRAC_BITS;
  localparam logic [MW:0] LO = (MW+1)'(MANT_MIN) << FRAC_BITS;
  localparam logic [MW:0] HI = (MW+1)'(MANT_MAX) << FRAC_BITS;

  logic [MW-1:0]          mant_q, mant_d;
  logic signed [EXP_W-1:0] exp_q, exp_d;
  logic [MW:0]            sum;      // one extra bit so 63.x + step cannot wrap
  gain_evt_t              evt_d;

  always_comb begin
    mant_d = mant_q;
    exp_d  = exp_q;
    evt_d  = '0;
    sum    = inc ? {1'b0, mant_q} + (MW+1)'(1) : {1'b0, mant_q} - (MW+1)'(1);
    if (load) begin
      mant_d = {init_mant, {FRAC_BITS{1'b0}}};
      exp_d  = init_exp;
    end else if (en) begin
      if (inc) begin
        if (sum > HI) begin
          if (exp_q < EXP_W'(EXP_MAX)) begin
            mant_d = mant_q >> 1;
            exp_d  = exp_q + EXP_W'(1);
            evt_d.renorm_up = 1'b1;
          end else begin
            mant_d = HI[MW-1:0];
            evt_d.sat_hi = 1'b1;
          end
        end else begin
          mant_d = sum[MW-1:0];
        end
      end else begin
        if (sum < LO) begin
          if (exp_q > EXP_W'(EXP_MIN)) begin
            mant_d = mant_q << 1;
            exp_d  = exp_q - EXP_W'(1);
            evt_d.renorm_dn = 1'b1;
          end else begin
            mant_d = LO[MW-1:0];
            evt_d.sat_lo = 1'b1;
          end
        end else begin
          mant_d = sum[MW-1:0];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mant_q <= MW'(RST_MANT) << FRAC_BITS;
      exp_q  <= EXP_W'(RST_EXP);
      evt    <= '0;
    end else begin
      mant_q <= mant_d;
      exp_q  <= exp_d;
      evt    <= evt_d;
    end
  end

  assign gain.mant = mant_q[MW-1:FRAC_BITS];
  assign gain.exp  = exp_q;

  // A step taken from inside the ranges never leaves them.
  logic in_range;
  assign in_range = (mant_q >= LO[MW-1:0]) && (mant_q <= HI[MW-1:0]) &&
                    (exp_q >= EXP_W'(EXP_MIN)) && (exp_q <= EXP_W'(EXP_MAX));
  a_stay_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (en && !load && in_range) |=> in_range);

endmodule
