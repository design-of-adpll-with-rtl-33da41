// dco: behavioural model of the digitally controlled oscillator, i.e. the
// two-stage pseudo-differential ring oscillator whose supply (RVDD) is set by
// the digitally controlled resistor (DCR) array. It is an analog block and is
// modelled here, not synthesised.
//
// The DCR array has 32 rows of 32 unit cells. Full rows are counted by the
// 31-bit row thermometer code; in the row being filled, the column code turns
// cells on from one side when the number of full rows is even and from the
// other side when it is odd (counting rows from 1, odd rows use a column bit
// of 1, even rows a bit of 0, as in the thesis). The model recovers the
// number of conducting cells from the two codes:
//   cells = 32*ones(row) + (ones(row) odd ? 31 - ones(col) : ones(col))
// which equals the 10-bit code the decoder was given. The proportional path
// drives the same resistor in parallel with a finer weight; its input is in
// units of 2^-PROP_FRAC cell. The frequency is taken as linear in the total:
//   f = F_MIN_HZ + (cells + prop * 2^-PROP_FRAC) * (F_MAX_HZ - F_MIN_HZ) / 1023
// F_MIN_HZ and F_MAX_HZ default to the typical-corner range of the thesis'
// oscillator (1.9 GHz to 4.05 GHz); the linear law is this model's choice.
//
// Noise: PN_1MHZ_DBC is the free-running phase noise at a 1 MHz offset
// (-90.5 dBc/Hz in the thesis). Read as white frequency noise it gives the
// per-period jitter sigma = sqrt(c*T) with c = 10^(PN/10) * (1 MHz)^2 / f^2;
// each half period gets an independent, near-Gaussian (sum of four uniform)
// deviation of sigma/sqrt(2), so the jitter accumulates as in a real
// oscillator. PN_1MHZ_DBC = 0 turns it off. FWALK_HZ (off by default) adds a
// random walk of the frequency with that peak step per output period, a
// stand-in for flicker-induced frequency drift.
// Edge times are kept as a real-valued ideal time and rounded to the 1 fs
// simulation precision, so rounding never accumulates into a frequency error.
module dco
  import adpll_pkg::*;
#(
  parameter real F_MIN_HZ  = 1.9e9,
  parameter real F_MAX_HZ  = 4.05e9,
  parameter real PN_1MHZ_DBC = -90.5,
  parameter real FWALK_HZ  = 0.0
) (
  input  logic [THERM_W-1:0]        row,
  input  logic [THERM_W-1:0]        col,
  input  logic signed [PROP_W-1:0]  prop,
  output logic                      clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real KDCO_HZ = (F_MAX_HZ - F_MIN_HZ) / 1023.0;

  int  n_row, n_col, cells;
  real t_ideal;      // ideal time of the next edge, ps
  real half_ps;
  real fwalk;        // accumulated frequency drift, Hz
  real freq_hz;      // present frequency

  always_comb begin
    n_row = $countones(row);
    n_col = $countones(col);
    cells = 32 * n_row + (n_row[0] ? (31 - n_col) : n_col);
  end

  // Uniform random number in [-1, 1).
  function automatic real urand_pm1();
    return (real'($urandom % 32'd65536) - 32768.0) / 32768.0;
  endfunction

  // Standard deviation of one half period's jitter, ps, at the present frequency.
  function automatic real sigma_half_ps();
    real c;
    c = (10.0 ** (PN_1MHZ_DBC / 10.0)) * 1.0e12 / (freq_hz * freq_hz);
    return 1.0e12 * $sqrt(c * 0.5 / freq_hz);
  endfunction

  initial begin
    clk_out = 1'b0;
    t_ideal = 0.0;
    fwalk   = 0.0;
    freq_hz = F_MIN_HZ;
  end

  always begin
    freq_hz = F_MIN_HZ + (real'(cells) + real'(prop) / real'(2 ** PROP_FRAC)) * KDCO_HZ + fwalk;
    if (freq_hz < 1.0e8) freq_hz = 1.0e8;
    half_ps = 0.5e12 / freq_hz;
    if (PN_1MHZ_DBC < 0.0)
      half_ps = half_ps + sigma_half_ps() * 0.8660254 *
                (urand_pm1() + urand_pm1() + urand_pm1() + urand_pm1());
    if (FWALK_HZ > 0.0 && clk_out) fwalk = fwalk + FWALK_HZ * urand_pm1();
    t_ideal = t_ideal + half_ps;
    #(t_ideal - $realtime);
    clk_out = ~clk_out;
  end

endmodule
