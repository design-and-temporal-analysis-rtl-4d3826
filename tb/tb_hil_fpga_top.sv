// tb_hil_fpga_top: end-to-end test of the HIL simulator's FPGA part, with
// every parameter at its default (2500-cycle PWM period, 4096 encoder counts
// per turn, one encoder step per clock).
//
// Around the design sit a behavioural MCU PWM unit (centre-aligned PWM with
// dead time, reload at the centre of the on pulses) and a behavioural host
// that plays the real-time model: on each interrupt it reads the three
// duties, clears the flag, "executes" for a random 30 % .. 72 % of a PWM
// period, and writes a new position (speed set by the phase B duty), three
// currents and SimDone. The current of phase C carries the number of the PWM
// period the step belongs to, so every DAC update can be traced back to the
// MCU sampling instant it answers.
//
// Checked, against values computed here:
//   * duties read by the host equal the MCU's programmed on times / Tpwm;
//   * every update happens on the capture event that follows SimDone, never
//     at SimDone (fixed update point of the synchronous configuration);
//   * the DAC codes are offset + gain * current of the released step;
//   * the response from MCU sampling to the end of the position update is the
//     same for every step and equals 0.5 Tpwm + capture time + 2 Tpwm;
//   * the decoded encoder count reaches each model position, with no
//     illegal quadrature step, and Z marks count zero;
//   * measured period and dead time.
// Mechanisms that must occur at least once: half- and full-period capture, a
// switch between them, phases held at 0 % and 100 %, a late model step, an
// overrun (two results in one step), a DAC gain change, backward rotation and
// the index pulse.
module tb_hil_fpga_top;
  import hil_pkg::*;

  localparam int T    = 2500;
  localparam int DEAD = 40;
  localparam int LAT  = 35;          // last capture edge -> cap_event
  localparam int NEV  = 110;         // capture events to run

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---- MCU model ------------------------------------------------------------
  int          half_in [3];
  logic [2:0]  top, bot;
  logic        reload, sample;

  mcu_pwm_model #(.TPWM(T), .DEAD(DEAD)) u_mcu (
    .clk(clk), .rst_n(rst_n), .half_in(half_in),
    .top(top), .bot(bot), .reload(reload), .sample(sample));

  // ---- design ---------------------------------------------------------------
  logic                  enc_a, enc_b, enc_z, dac_load;
  logic [2:0][DAC_W-1:0] dac_code;
  logic [ADDR_W-1:0]     host_addr;
  logic                  host_wr, host_rd, host_rvalid, host_irq;
  logic [31:0]           host_wdata, host_rdata;

  hil_fpga_top dut (
    .clk(clk), .rst_n(rst_n), .pwm_top(top), .pwm_bot(bot),
    .enc_a(enc_a), .enc_b(enc_b), .enc_z(enc_z),
    .dac_code(dac_code), .dac_load(dac_load),
    .host_addr(host_addr), .host_wr(host_wr), .host_wdata(host_wdata),
    .host_rd(host_rd), .host_rdata(host_rdata), .host_rvalid(host_rvalid),
    .host_irq(host_irq));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---- bookkeeping in clock cycles --------------------------------------------
  int cyc = 0, nreload = 0;
  int reload_cyc [int];            // reload number -> cycle
  int half_hist  [int][3];         // reload number -> programmed halves
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && reload) begin
      reload_cyc[nreload + 1] = cyc;
      for (int p = 0; p < 3; p++) half_hist[nreload + 1][p] = u_mcu.half[p];
      nreload <= nreload + 1;
    end
  end

  int irq_rise_cyc = -10, nevents = 0;
  logic irq_q = 0;
  always @(posedge clk) begin
    irq_q <= host_irq;
    if (rst_n && host_irq && !irq_q) begin
      irq_rise_cyc <= cyc;
      nevents      <= nevents + 1;
    end
  end

  // ---- encoder decoder ----------------------------------------------------------
  function automatic int qstate(input logic a, input logic b);
    case ({a, b})
      2'b10:   return 0;
      2'b11:   return 1;
      2'b01:   return 2;
      default: return 3;
    endcase
  endfunction
  int dec_cnt = 0, last_q = 0, illegal = 0, zbad = 0, n_z = 0, n_back = 0;
  always @(posedge clk) if (rst_n) begin
    int q, d;
    q = qstate(enc_a, enc_b);
    d = (q - last_q + 4) % 4;
    if (d == 1) dec_cnt = (dec_cnt + 1) % 4096;
    else if (d == 3) begin
      dec_cnt = (dec_cnt + 4095) % 4096;
      n_back++;
    end else if (d == 2) illegal++;
    last_q = q;
    if (enc_z && !(dec_cnt == 0)) zbad++;
    if (enc_z) n_z++;
  end

  // ---- host (real-time model) ----------------------------------------------------
  task automatic bus_wr(input int a, input logic [31:0] d);
    @(negedge clk); host_addr = ADDR_W'(a); host_wdata = d; host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask
  task automatic bus_rd(input int a, output logic [31:0] d);
    @(negedge clk); host_addr = ADDR_W'(a); host_rd = 1;
    @(negedge clk); host_rd = 0;
    d = host_rdata;
  endtask

  // released-result expectation
  typedef struct { logic [31:0] theta; int cur [3]; int period; } step_t;
  step_t written, expect_rel;
  bit    have_written = 0, have_expect = 0;
  int    gain = 256;
  bit    freeze = 1;          // model holds position (start, transitions)
  bit    steady = 0;          // response time and encoder checks active
  int    n_half = 0, n_full = 0, n_switch = 0, n_sat = 0, n_late = 0;
  int    n_over = 0, n_gain = 0, n_upd = 0, n_resp = 0, n_duty = 0, n_enc = 0;
  cap_mode_e mode_now = CAP_HALF;
  logic [31:0] theta_model = 32'h0;

  // at every capture event the pending result, if any, is what must be released
  always @(posedge clk) if (rst_n && dut.cap_event) begin
    if (have_written) begin
      expect_rel   = written;
      have_expect  = 1;
      have_written = 0;
    end
  end

  // DAC updates
  int last_upd_cyc = 0;
  always @(posedge clk) if (rst_n && dac_load) begin
    n_upd++;
    check(cyc == irq_rise_cyc + 1,
          $sformatf("update %0d cycles after the capture event", cyc - irq_rise_cyc));
    check(have_expect, "update with a released result");
    for (int p = 0; p < 3; p++) begin
      longint v;
      v = 32768 + ((longint'(expect_rel.cur[p]) * gain) >>> 8);
      if (v < 0) v = 0;
      if (v > 65535) v = 65535;
      check(dac_code[p] == 16'(v), $sformatf("DAC %0d code %0d expected %0d", p, dac_code[p], v));
    end
    if (steady) begin
      // position finished N = T cycles after the update; the step answers
      // the MCU sample taken half a period before reload number 'period'
      int k, resp, mh, exp_resp;
      k  = expect_rel.period;
      mh = half_hist[k][0];
      for (int p = 1; p < 3; p++) if (half_hist[k][p] > mh) mh = half_hist[k][p];
      resp = (cyc - 1 + T) - (reload_cyc[k] - T / 2);
      if (mode_now == CAP_HALF) exp_resp = T / 2 + (mh + LAT) + T + T + 1;
      else begin
        int mn;
        mn = half_hist[k][0];
        for (int p = 1; p < 3; p++) if (half_hist[k][p] < mn) mn = half_hist[k][p];
        exp_resp = T / 2 + (T - mn + LAT) + T + T + 1;
      end
      n_resp++;
      check(resp == exp_resp, $sformatf("response %0d cycles, expected %0d", resp, exp_resp));
    end
    last_upd_cyc = cyc;
  end

  // encoder: just before each update, the count has reached the last target
  always @(posedge clk) if (rst_n && dut.update && steady && expect_rel.period > 0) begin
    n_enc++;
    check(dec_cnt == int'(dut.u_enc.theta_tgt[31 -: 12]) ||
          (dec_cnt + 1) % 4096 == int'(dut.u_enc.theta_tgt[31 -: 12]) ||
          (dec_cnt + 4095) % 4096 == int'(dut.u_enc.theta_tgt[31 -: 12]),
          $sformatf("encoder count %0d, target %0d", dec_cnt, dut.u_enc.theta_tgt[31 -: 12]));
  end

  task automatic set_halves(input int a, input int b, input int c);
    half_in[0] = a; half_in[1] = b; half_in[2] = c;
  endtask

  initial begin
    logic [31:0] d;
    int hb, tae, duty_exp [3];
    host_addr = 0; host_wr = 0; host_rd = 0; host_wdata = 0;
    set_halves(900, 600, 300);
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < NEV; e++) begin
      int k;
      @(posedge clk iff host_irq);
      k = nreload;                                   // period of this event
      // MCU schedule: A fixed high, C fixed low, B moves
      steady = !freeze && e > 3;
      if (e >= 80 && e < 84) begin
        set_halves(900, T / 2, 0);                   // B at 100 %, C at 0 %
        n_sat++;
      end else begin
        hb = 350 + int'($urandom_range(0, 500));
        set_halves(900, hb, 300);
      end
      // read and check duties
      for (int p = 0; p < 3; p++) begin
        bus_rd(REG_DUTY_A + p, d);
        duty_exp[p] = (2 * half_hist[k][p] * 32768) / T;
        if (!freeze) begin
          n_duty++;
          check(d == 32'(duty_exp[p]), $sformatf("event %0d duty %0d = %h, expected %h", e, p, d, duty_exp[p]));
        end
      end
      if (mode_now == CAP_HALF) n_half++; else n_full++;
      bus_wr(REG_STATUS, 1);
      // transitions
      freeze = (e < 2) || (e >= 38 && e < 46) || (e >= 76 && e < 90);
      if (e == 42) begin
        // switch after the last rising edge of this PWM cycle, so that the
        // full method's first capture falls in the next cycle
        @(posedge clk iff u_mcu.c == T - 150);
        bus_wr(REG_CTRL, 0);
        mode_now = CAP_FULL;
        n_switch++;
      end
      if (e == 60) begin
        bus_wr(REG_DAC_GAIN, 32'h0200);
        n_gain++;
      end
      // model step
      tae = int'($urandom_range(T * 30 / 100, T * 72 / 100));
      repeat (tae) @(negedge clk);
      if (e == 95) begin
        n_late++;                                    // no result this step
        continue;
      end
      if (!freeze)
        theta_model = theta_model + 32'((duty_exp[1] - 32'h3000) * 4096);
      written.theta  = theta_model;
      written.cur[0] = duty_exp[0] - 16384;
      written.cur[1] = duty_exp[1] - 16384;
      written.cur[2] = k;
      written.period = k;
      if (e == 100) begin
        // a first, wrong result, replaced before the event
        bus_wr(REG_THETA, theta_model + 32'h0100_0000);
        bus_wr(REG_SIMDONE, 0);
        n_over++;
      end
      bus_wr(REG_THETA, written.theta);
      for (int p = 0; p < 3; p++) bus_wr(REG_CUR_A + p, 32'(written.cur[p]));
      if (e == 60) gain = 512;
      bus_wr(REG_SIMDONE, 0);
      have_written = 1;
    end
    // final status
    bus_rd(REG_LATE, d);     check(d == 1, $sformatf("late count %0d", d));
    bus_rd(REG_OVERRUN, d);  check(d == 1, $sformatf("overrun count %0d", d));
    bus_rd(REG_TPWM_MEAS, d); check(d == T, $sformatf("measured period %0d", d));
    bus_rd(REG_DEAD_A, d);   check(d == DEAD, $sformatf("dead time %0d", d));
    check(illegal == 0, $sformatf("%0d illegal quadrature steps", illegal));
    check(zbad == 0, "Z only at count zero");
    // every mechanism happened
    check(n_half > 0,   "half-period capture used");
    check(n_full > 0,   "full-period capture used");
    check(n_switch > 0, "capture method switched");
    check(n_sat > 0,    "saturated phases");
    check(n_late > 0,   "late model step");
    check(n_over > 0,   "overrun");
    check(n_gain > 0,   "DAC gain change");
    check(n_back > 0,   "backward rotation");
    check(n_z > 0,      "index pulse");
    check(n_resp > 50,  $sformatf("%0d response times checked", n_resp));
    check(n_enc > 50,   $sformatf("%0d encoder positions checked", n_enc));
    check(n_upd == NEV - 2, $sformatf("%0d updates", n_upd));
    $display("mechanisms: half=%0d full=%0d switch=%0d sat=%0d late=%0d overrun=%0d gain=%0d back=%0d z=%0d",
             n_half, n_full, n_switch, n_sat, n_late, n_over, n_gain, n_back, n_z);
    $display("checked: duties=%0d updates=%0d responses=%0d encoder=%0d", n_duty, n_upd, n_resp, n_enc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * T * (NEV + 20));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
