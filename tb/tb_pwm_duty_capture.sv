// tb_pwm_duty_capture: self-checking test of the PWM duty capture block.
//
// A behavioural centre-aligned PWM source (mcu_pwm_model) drives all six
// gate signals. Each random duty set is held for three PWM periods; just
// before it changes, the last captured duties must equal
// floor(on * 2^15 / Tpwm) computed here. Checked in both capture methods, with
// phases held at 0 % and 100 %, plus: one capture event per PWM period, the
// measured period and dead time, and the event latency in the half method
// (35 cycles after the last falling edge: 2 synchroniser, 1 edge detect,
// 32 divider and output register).
module tb_pwm_duty_capture;
  import hil_pkg::*;

  localparam int TPWM = 400;
  localparam int DEAD = 10;
  localparam int LAT  = 35;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int          half_in [3];
  logic [2:0]  top, bot;
  logic        reload, sample;
  cap_mode_e   mode;
  logic        cap_event;
  duty_t  [2:0] duty;
  ticks_t [2:0] dead;
  ticks_t       tpwm_meas;

  mcu_pwm_model #(.TPWM(TPWM), .DEAD(DEAD)) u_mcu (
    .clk(clk), .rst_n(rst_n), .half_in(half_in),
    .top(top), .bot(bot), .reload(reload), .sample(sample));

  pwm_duty_capture dut (
    .clk(clk), .rst_n(rst_n), .pwm_top(top), .pwm_bot(bot), .mode(mode),
    .tpwm(ticks_t'(TPWM)), .cap_event(cap_event), .duty(duty), .dead(dead),
    .tpwm_meas(tpwm_meas));

  int checks = 0, failures = 0;
  int cyc = 0, events = 0, last_reload = 0, last_event = 0;
  int lat_checks = 0;
  int cur_half [3];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && reload) last_reload <= cyc;
    if (rst_n && cap_event) begin
      events     <= events + 1;
      last_event <= cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int exp_duty(input int h);
    return ((2 * h) * 32768) / TPWM;
  endfunction

  // half-method latency: event LAT cycles after reload + max half
  always @(posedge clk) begin
    if (cap_event && mode == CAP_HALF && lat_checks < 20 && cyc > 10 * TPWM) begin
      int mh;
      mh = cur_half[0];
      if (cur_half[1] > mh) mh = cur_half[1];
      if (cur_half[2] > mh) mh = cur_half[2];
      if (mh > 0 && mh < TPWM / 2 && cur_half[0] > 0 && cur_half[1] > 0 && cur_half[2] > 0) begin
        lat_checks++;
        check(cyc - last_reload == mh + LAT,
              $sformatf("event latency %0d, expected %0d", cyc - last_reload, mh + LAT));
      end
    end
  end

  // one group: hold halves for three periods, then check the last event
  task automatic group(input int h0, input int h1, input int h2, input bit chk_dead);
    int ev0;
    half_in[0] = h0; half_in[1] = h1; half_in[2] = h2;
    @(posedge clk iff reload);
    for (int p = 0; p < 3; p++) cur_half[p] = half_in[p];
    ev0 = events;
    repeat (3 * TPWM - 2) @(posedge clk);
    check(duty[0] == duty_t'(exp_duty(h0)), $sformatf("duty A %h exp %h", duty[0], exp_duty(h0)));
    check(duty[1] == duty_t'(exp_duty(h1)), $sformatf("duty B %h exp %h", duty[1], exp_duty(h1)));
    check(duty[2] == duty_t'(exp_duty(h2)), $sformatf("duty C %h exp %h", duty[2], exp_duty(h2)));
    check(events - ev0 >= 2 && events - ev0 <= 4, $sformatf("%0d events in 3 periods", events - ev0));
    if (chk_dead) begin
      check(dead[0] == ticks_t'(DEAD), $sformatf("dead A %0d", dead[0]));
      check(tpwm_meas == ticks_t'(TPWM), $sformatf("period %0d", tpwm_meas));
    end
  endtask

  initial begin
    mode = CAP_HALF;
    for (int p = 0; p < 3; p++) half_in[p] = 100;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // settle
    repeat (3 * TPWM) @(posedge clk);
    for (int m = 0; m < 2; m++) begin
      mode = m ? CAP_FULL : CAP_HALF;
      repeat (2 * TPWM) @(posedge clk);
      for (int g = 0; g < 25; g++)
        group(1 + $urandom_range(0, 180), 1 + $urandom_range(0, 180),
              1 + $urandom_range(0, 180), 1'b1);
      // saturated phases: B at 100 %, C at 0 %, and back
      group(50, TPWM / 2, 0, 1'b0);
      group(70, TPWM / 2, 0, 1'b0);
      group(120, 30, 160, 1'b0);
      group(20, 0, TPWM / 2, 1'b0);
      group(90, 110, 130, 1'b0);
    end
    check(lat_checks > 5, "latency was measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * TPWM * 250);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
