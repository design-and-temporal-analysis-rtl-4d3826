// pwm_phase_capture: duty ratio and dead-time of one inverter phase, measured
// from the phase's top and bottom switch PWM signals.
//
// A counter restarts on every edge of the top signal, so at each edge it holds
// the length of the interval that just ended (on time at a falling edge, off
// time at a rising edge). With the PWM period Tpwm known, one edge completes
// the duty ratio of the new PWM cycle:
//   full method, at the rising edge ending an off interval:
//       on = Tpwm - Toff                                (Eq. 1, second form)
//   half method, at the falling edge that ends the pulse straddling reload:
//       on = 2*Ton - (Tpwm - Toff_prev)                 (Eq. 4 doubled)
//     the pulse is centred on the reload instant, so its first half,
//     (Tpwm - Toff_prev)/2, still belongs to the old duty and only the part
//     after reload is the new duty/2.
// The on time is clamped to [0, Tpwm] and divided by Tpwm in a sequential
// divider, giving a Q1.15 duty; done pulses when it is ready (about 33 cycles
// after the edge reaches this block).
//
// A phase held at 0 % or 100 % has no edges. If no edge is seen for 1.5 Tpwm
// the block reports duty 0 or 1.0 from the level, then again every Tpwm.
// The first edge after such a stretch only restarts the measurement; after a
// stretch at 100 % the next PWM cycle is captured with the full method, since
// the half method needs the preceding off interval. That fallback, the
// clamping and all widths are this design's choices.
//
// Also measured, for the host: the period Ton + Toff at each rising edge
// (Eq. 2), and the dead time at each rising edge of the bottom signal. The
// bottom switch is off for the top on time plus one dead time on each side,
// so |Ton_top - Toff_bottom| (Eq. 3) spans two gaps; dead reports half of
// it, one gap. Both are in cycles; tpwm must stay below 43690 cycles.
// Being half of a 16-bit difference, dead never sets its top bit; it keeps
// the common tick width so the host reads it like the other intervals.
module pwm_phase_capture
  import hil_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      top,        // synchronised top-switch PWM
  input  logic      bot,        // synchronised bottom-switch PWM
  input  cap_mode_e mode,
  input  ticks_t    tpwm,       // PWM period in cycles
  output logic      done,       // one-cycle pulse: duty holds a new value
  output duty_t     duty,       // Q1.15
  output ticks_t    dead,       // Eq. (3) measure, cycles
  output ticks_t    period      // Eq. (2) measure, cycles
);
  localparam int unsigned NW = TS_W + DUTY_FRAC;

  logic   top_q, bot_q;
  logic   rise, fall, bot_edge, bot_rise;
  ticks_t cnt;                  // cycles since the last top edge
  ticks_t bcnt;                 // cycles since the last bottom edge
  ticks_t t_on, t_off;          // last completed top intervals
  logic [TS_W:0] wd_limit;
  logic   wd_fire;

  assign rise     = top & ~top_q;
  assign fall     = ~top & top_q;
  assign bot_edge = bot ^ bot_q;
  assign bot_rise = bot & ~bot_q;
  assign wd_limit = {1'b0, tpwm} + {2'b0, tpwm[TS_W-1:1]};
  assign wd_fire  = !(rise || fall) && ({1'b0, cnt} == wd_limit);

  // On time of the new PWM cycle, signed and one bit wider to clamp.
  logic signed [TS_W+2:0] on_raw;
  ticks_t                 on_ticks;
  logic                   cap_now;

  // sat: the watchdog has fired since the last edge, so the interval that
  // ends at the next edge is not a PWM interval and is not used. After a
  // saturated-high stretch the half method cannot locate the reload instant,
  // so that one PWM cycle is captured with the full method (force_full).
  logic sat, force_full;

  always_comb begin
    on_raw  = '0;
    cap_now = 1'b0;
    if (wd_fire) begin
      on_raw  = top ? $signed({3'b0, tpwm}) : '0;
      cap_now = 1'b1;
    end else if (rise && !sat && (mode == CAP_FULL || force_full)) begin
      on_raw  = $signed({3'b0, tpwm}) - $signed({3'b0, cnt});
      cap_now = 1'b1;
    end else if (fall && !sat && mode == CAP_HALF) begin
      on_raw  = $signed({2'b0, cnt, 1'b0}) - $signed({3'b0, tpwm})
              + $signed({3'b0, t_off});
      cap_now = 1'b1;
    end
    if (on_raw < 0)                          on_ticks = '0;
    else if (on_raw > $signed({3'b0, tpwm})) on_ticks = tpwm;
    else                                     on_ticks = on_raw[TS_W-1:0];
  end

  logic          div_busy, div_done;
  logic [NW-1:0] div_q;

  udiv_seq #(.NW(NW), .DW(TS_W)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .start(cap_now && !div_busy),
    .n    ({on_ticks, {DUTY_FRAC{1'b0}}}),
    .d    (tpwm),
    .busy (div_busy),
    .done (div_done),
    .q    (div_q)
  );

  assign done = div_done;
  assign duty = div_q[DUTY_W-1:0];

  logic [TS_W:0] dead_diff;
  logic [TS_W:0] per_sum;
  assign dead_diff = (t_on >= bcnt) ? {1'b0, t_on - bcnt} : {1'b0, bcnt - t_on};
  assign per_sum   = {1'b0, t_on} + {1'b0, cnt};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_q  <= 1'b0;
      bot_q  <= 1'b0;
      cnt    <= '0;
      bcnt   <= '0;
      t_on   <= '0;
      t_off  <= '0;
      sat        <= 1'b0;
      force_full <= 1'b0;
      dead   <= '0;
      period <= '0;
    end else begin
      top_q <= top;
      bot_q <= bot;

      if (rise || fall)   cnt <= ticks_t'(1);
      else if (wd_fire)   cnt <= {1'b0, tpwm[TS_W-1:1]};
      else if (cnt != '1) cnt <= cnt + 1'b1;

      if (wd_fire)                sat <= 1'b1;
      else if (rise || fall)      sat <= 1'b0;
      if (fall && sat)            force_full <= 1'b1;
      else if (rise)              force_full <= 1'b0;

      if (fall) t_on <= cnt;
      if (rise) begin
        t_off  <= sat ? tpwm : cnt;
        if (!sat) period <= per_sum[TS_W] ? '1 : per_sum[TS_W-1:0];
      end

      if (bot_edge)        bcnt <= ticks_t'(1);
      else if (bcnt != '1) bcnt <= bcnt + 1'b1;
      if (bot_rise) dead <= dead_diff[TS_W:1];
    end
  end
endmodule
