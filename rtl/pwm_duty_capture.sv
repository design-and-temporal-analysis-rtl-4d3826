// pwm_duty_capture: the PWM duty capture block of the HIL simulator. It turns
// the six gate signals of the motor control unit (top and bottom switch of
// phases A, B, C) into three duty ratios per PWM period and produces the
// synchronisation event that starts the real-time model.
//
// Each phase is measured by pwm_phase_capture after a two-flop synchroniser.
// A phase reports a new duty once per PWM cycle, at the edge its capture
// method needs; the three edges fall in the same half period because all
// pulses are centred on the same reload instant. When every phase has
// reported since the last event, the three duties are copied to the outputs
// and cap_event pulses for one cycle: this is the PwmLoad event (t_k^c) that
// triggers the model in the synchronous configuration. Event latency is the
// synchroniser (2 cycles), edge detection (1) and the divider (31 + 1)
// cycles after the last of the three capture edges.
//
// The event is derived from the PWM signals themselves, as the source design
// does (no extra synchronisation wire). Gathering all three phases before
// firing is this design's choice.
module pwm_duty_capture
  import hil_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NPHASE-1:0]       pwm_top,     // asynchronous, from the MCU
  input  logic [NPHASE-1:0]       pwm_bot,
  input  cap_mode_e               mode,
  input  ticks_t                  tpwm,
  output logic                    cap_event,   // one-cycle PwmLoad pulse
  output duty_t  [NPHASE-1:0]     duty,        // Q1.15, valid from cap_event
  output ticks_t [NPHASE-1:0]     dead,        // Eq. (3) per phase
  output ticks_t                  tpwm_meas    // Eq. (2), phase A
);
  logic [NPHASE-1:0] top_s, bot_s;
  logic [NPHASE-1:0] ph_done;
  duty_t  [NPHASE-1:0] ph_duty;
  ticks_t [NPHASE-1:0] ph_period;
  logic [NPHASE-1:0] got, got_next;

  sync2 #(.W(2 * NPHASE)) u_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({pwm_bot, pwm_top}),
    .q    ({bot_s, top_s})
  );

  for (genvar p = 0; p < NPHASE; p++) begin : g_ph
    pwm_phase_capture u_ph (
      .clk   (clk),
      .rst_n (rst_n),
      .top   (top_s[p]),
      .bot   (bot_s[p]),
      .mode  (mode),
      .tpwm  (tpwm),
      .done  (ph_done[p]),
      .duty  (ph_duty[p]),
      .dead  (dead[p]),
      .period(ph_period[p])
    );
  end

  assign got_next  = got | ph_done;
  assign tpwm_meas = ph_period[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got       <= '0;
      cap_event <= 1'b0;
      duty      <= '0;
    end else begin
      cap_event <= 1'b0;
      if (&got_next) begin
        got       <= '0;
        cap_event <= 1'b1;
        duty      <= ph_duty;
      end else begin
        got <= got_next;
      end
    end
  end
endmodule
