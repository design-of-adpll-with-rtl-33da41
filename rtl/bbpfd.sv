// bbpfd: behavioural model of the bang-bang phase frequency detector. The
// real block is a custom circuit (pre-charged input stages, a regenerative
// latch like a StrongARM latch, and an output latch), so it is modelled here
// by its timing behaviour, not synthesised.
//
// It behaves like the classic two-flip-flop PFD with an early/late output:
// the first rising edge of one input arms that side; the next rising edge of
// the other input completes the comparison, and the output latch then shows
// which came first. Further edges of the side that is already armed are
// ignored, so during a cycle slip the k-th reference edge is still compared
// with its matching feedback edge, as a PFD does. bb_up = 1 / bb_dn = 0 means
// the reference edge came first (the oscillator is slow); bb_up = 0 / bb_dn = 1
// means the feedback edge came first. The outputs are complementary and hold
// their value until the next comparison completes; they change at the moment
// the second edge arrives (zero resolution delay in this model). Edges that
// arrive in the same simulation time step are a tie.
// The two non-ideal effects the thesis reports for its post-layout circuit
// are modelled: an offset of OFFSET_FS (30 fs) and a hysteresis of HYST_FS
// (50 fs). With lead = t_fb - t_ref (positive when the reference is first),
// the decision is UP when lead > OFFSET_FS - HYST_FS/2 if the previous
// decision was UP, and when lead > OFFSET_FS + HYST_FS/2 if it was DN, so the
// output prefers its previous state inside a window HYST_FS wide centred on
// OFFSET_FS. A lead exactly at the threshold keeps the previous decision.
// Leads are taken at 1 fs resolution. The threshold rule itself is this
// model's reading of "offset" and "hysteresis"; with both set to 0 the model
// is an ideal early/late detector.
// `bb_clk` is the comparison-done strobe (the OR of the two acknowledge
// nodes of the latch): it rises T_DONE_PS after each decision, once BBUP/BBDN
// are valid, and falls when the next comparison is armed. The loop filter is
// clocked by it, so it acts on each decision right away.
// `decisions` counts completed comparisons (wraps), for observation only.
// Reset (active low, asynchronous) disarms both sides and gives BBDN = 1.
module bbpfd #(
  parameter real T_DONE_PS = 10.0,
  parameter real OFFSET_FS = 30.0,
  parameter real HYST_FS   = 50.0
) (
  input  logic        clk_ref,
  input  logic        clk_fb,
  input  logic        rst_n,
  output logic        bb_up,
  output logic        bb_dn,
  output logic        bb_clk,
  output logic [31:0] decisions
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {IDLE, REF_ARMED, FB_ARMED} arm_t;

  arm_t state;
  logic ref_last, fb_last;
  logic ref_rise, fb_rise;
  logic done;          // a comparison completed in this step
  logic arm;           // an input edge armed the next comparison in this step
  realtime t_arm;      // time the pending comparison was armed

  // Decision for a reference lead of lead_ps, given the previous decision.
  function automatic logic decide(input realtime lead_ps, input logic prev_up);
    real lead_fs, thr_fs;
    lead_fs = real'(longint'(lead_ps * 1000.0));      // 1 fs resolution
    thr_fs  = prev_up ? OFFSET_FS - HYST_FS / 2.0 : OFFSET_FS + HYST_FS / 2.0;
    if (lead_fs > thr_fs)      return 1'b1;
    else if (lead_fs < thr_fs) return 1'b0;
    else                       return prev_up;
  endfunction

  initial begin
    state     = IDLE;
    t_arm     = 0.0;
    ref_last  = 1'b0;
    fb_last   = 1'b0;
    bb_up     = 1'b0;
    bb_clk    = 1'b0;
    decisions = '0;
  end

  always @(clk_ref or clk_fb or rst_n) begin
    ref_rise = clk_ref && !ref_last;
    fb_rise  = clk_fb  && !fb_last;
    ref_last = clk_ref;
    fb_last  = clk_fb;
    done     = 1'b0;
    arm      = 1'b0;
    if (!rst_n) begin
      state = IDLE;
      bb_up = 1'b0;
    end else if (ref_rise && fb_rise) begin
      // Both edges in one step: each completes or is a tie.
      if (state == IDLE) begin
        bb_up     = decide(0.0, bb_up);           // lead of zero
        decisions = decisions + 32'd1;
        done      = 1'b1;
      end else begin
        // The armed comparison completes; the unmatched edge re-arms it.
        bb_up     = decide((state == REF_ARMED) ? $realtime - t_arm : t_arm - $realtime, bb_up);
        decisions = decisions + 32'd1;
        t_arm     = $realtime;
        done      = 1'b1;
      end
    end else if (ref_rise) begin
      if (state == FB_ARMED) begin
        bb_up     = decide(t_arm - $realtime, bb_up);

        decisions = decisions + 32'd1;
        state     = IDLE;
        done      = 1'b1;
      end else begin
        state = REF_ARMED;
        arm   = 1'b1;
        t_arm = $realtime;
      end
    end else if (fb_rise) begin
      if (state == REF_ARMED) begin
        bb_up     = decide($realtime - t_arm, bb_up);

        decisions = decisions + 32'd1;
        state     = IDLE;
        done      = 1'b1;
      end else begin
        state = FB_ARMED;
        arm   = 1'b1;
        t_arm = $realtime;
      end
    end
    if (arm || !rst_n) bb_clk <= 1'b0;
    if (done)          bb_clk <= #(T_DONE_PS) 1'b1;
  end

  assign bb_dn = ~bb_up;

endmodule
