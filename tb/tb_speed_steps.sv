// tb_speed_steps: the two drive scenarios, a speed ramp up to 4000 rpm and
// speed steps of 1000, 4000 and 8000 rpm, run through the whole FPGA design
// at its default sizes, in the synchronous configuration.
//
// A full two-second drive run is 32000 model steps, far too long to simulate
// cycle by cycle, so the ramp is compressed into 20 PWM periods and each
// speed step is held for 12 PWM periods. The behavioural
// host advances the rotor position by speed * Tpwm per model step
// (8000 rpm is 34.1 encoder counts per 62.5 us step at 4096 counts per turn).
// A quadrature decoder, standing in for the MCU's encoder timer, must see no
// illegal step and must count, over each held speed, the counts the position
// advanced; Z must appear as the rotor passes count zero.
module tb_speed_steps;
  import hil_pkg::*;

  localparam int     T    = 2500;               // cycles per PWM period
  localparam real    TPWM_S = 62.5e-6;
  localparam int     HOLD = 12;                  // periods per speed

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int          half_in [3];
  logic [2:0]  top, bot;
  logic        reload, sample;
  mcu_pwm_model #(.TPWM(T), .DEAD(40)) u_mcu (
    .clk(clk), .rst_n(rst_n), .half_in(half_in),
    .top(top), .bot(bot), .reload(reload), .sample(sample));

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

  // decoder with an unwrapped count
  function automatic int qstate(input logic a, input logic b);
    case ({a, b})
      2'b10:   return 0;
      2'b11:   return 1;
      2'b01:   return 2;
      default: return 3;
    endcase
  endfunction
  longint dec_total = 0;
  int last_q = 0, illegal = 0, zrise = 0;
  logic z_q = 0;
  always @(posedge clk) if (rst_n) begin
    int q, d;
    q = qstate(enc_a, enc_b);
    d = (q - last_q + 4) % 4;
    if (d == 1) dec_total++;
    else if (d == 3) dec_total--;
    else if (d == 2) illegal++;
    last_q = q;
    z_q <= enc_z;
    if (enc_z && !z_q) zrise++;
  end

  task automatic bus_wr(input int a, input logic [31:0] d);
    @(negedge clk); host_addr = ADDR_W'(a); host_wdata = d; host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask

  longint theta_abs = 0;       // position in 2^-32 turns, unwrapped
  int     rpm = 0;

  function automatic longint step_of(input int r);
    return longint'(real'(r) / 60.0 * TPWM_S * 4294967296.0);
  endfunction

  // profile 0: ramp 0 -> 4000 rpm over RAMP steps; profiles 1..3: held speeds
  localparam int RAMP = 20;
  function automatic int rpm_of(input int prof, input int e);
    case (prof)
      0:       return 4000 * (e + 1) / RAMP;
      1:       return 1000;
      2:       return 4000;
      default: return 8000;
    endcase
  endfunction

  initial begin
    longint start_pos, start_dec, dtheta, prev_dtheta;
    int     nsteps_prof;
    host_addr = 0; host_wr = 0; host_rd = 0; host_wdata = 0;
    half_in[0] = 700; half_in[1] = 600; half_in[2] = 500;
    prev_dtheta = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      nsteps_prof = (s == 0) ? RAMP : HOLD;
      for (int e = 0; e < nsteps_prof; e++) begin
        rpm    = rpm_of(s, e);
        dtheta = step_of(rpm);
        @(posedge clk iff host_irq);
        bus_wr(REG_STATUS, 1);
        // at the third event of a profile the position of its first step
        // has just been reached: measure from there
        if (e == 2) begin
          start_pos = theta_abs - prev_dtheta;
          start_dec = dec_total;
        end
        repeat (T * 45 / 100) @(negedge clk);          // 45 us model step
        theta_abs  += dtheta;
        prev_dtheta = dtheta;
        bus_wr(REG_THETA, 32'(theta_abs));
        bus_wr(REG_SIMDONE, 0);
      end
      // the last position is released at the next event and reached one
      // period later
      @(posedge clk iff host_irq);
      bus_wr(REG_STATUS, 1);
      repeat (T + 100) @(negedge clk);
      begin
        longint counted, expc;
        expc    = (theta_abs >>> 20) - (start_pos >>> 20);
        counted = dec_total - start_dec;
        check(counted >= expc - 1 && counted <= expc + 1,
              $sformatf("profile %0d: %0d counts decoded, %0d expected", s, counted, expc));
        if (s == 0)
          $display("ramp to %0d rpm: %0d counts over %0d steps", rpm, counted, nsteps_prof - 1);
        else
          $display("%0d rpm: %0d counts over %0d steps (%.1f per step)", rpm, counted,
                   nsteps_prof - 1, real'(counted) / (nsteps_prof - 1));
      end
      // bring the pipeline back to a step boundary for the next profile
      @(posedge clk iff host_irq);
      bus_wr(REG_STATUS, 1);
      theta_abs  += dtheta;
      prev_dtheta = dtheta;
      bus_wr(REG_THETA, 32'(theta_abs));
      bus_wr(REG_SIMDONE, 0);
    end
    check(illegal == 0, $sformatf("%0d illegal quadrature steps", illegal));
    check(zrise > 0, "index pulse seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * T * (3 * HOLD + RAMP + 30));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
