// mcu_pwm_model: behavioural model of the MCU's centre-aligned PWM unit, for
// testbenches only.
//
// A counter runs 0 .. TPWM-1; count 0 is the reload instant and the centre
// of every top-switch on pulse, count TPWM/2 the current sampling instant.
// At reload the on time of each phase (2*half[p] cycles) is taken from the
// inputs, so the half pulse after reload already has the new duty and the
// half before the next reload still has it too. The bottom switch is the
// complement of the top with DEAD idle cycles on each side.
module mcu_pwm_model #(
  parameter int TPWM = 2500,
  parameter int DEAD = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int          half_in [3],   // half on time per phase, cycles
  output logic [2:0]  top,
  output logic [2:0]  bot,
  output logic        reload,        // one cycle at count 0
  output logic        sample         // one cycle at count TPWM/2
);
  int c;
  int half [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= 0;
      for (int p = 0; p < 3; p++) half[p] <= 0;
    end else begin
      c <= (c == TPWM - 1) ? 0 : c + 1;
      if (c == TPWM - 1)
        for (int p = 0; p < 3; p++) half[p] <= half_in[p];
    end
  end

  always_comb begin
    reload = rst_n && (c == 0);
    sample = rst_n && (c == TPWM / 2);
    for (int p = 0; p < 3; p++) begin
      top[p] = rst_n && ((c < half[p]) || (c >= TPWM - half[p]));
      bot[p] = rst_n && (c >= half[p] + DEAD) && (c < TPWM - half[p] - DEAD);
    end
  end
endmodule
