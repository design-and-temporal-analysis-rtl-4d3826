// hil_fpga_top: FPGA part of a signal-level, average-value hardware-in-the-
// loop simulator for testing a permanent-magnet motor control unit (MCU).
//
// The MCU's six PWM gate signals come in; encoder A/B/Z and three DAC codes
// for the emulated phase-current transducers go out. Between them the
// inverter and motor are computed by a real-time model on a host processor,
// reached through the register port. One model step per PWM period runs in
// lock-step with the MCU (synchronous configuration):
//   1. pwm_duty_capture measures the three duties of the PWM cycle that
//      follows the MCU's reload and raises cap_event (PwmLoad, irq).
//   2. The host reads the duties, runs the model and writes position,
//      currents and SimDone (host_regs).
//   3. result_update_sync holds the results until the next cap_event, one PWM
//      period after the step started, and then updates
//   4. encoder_pulse_gen, which interpolates position over the next period,
//      and dac_interface, which updates the current codes at the same time.
// The response from MCU sampling to the finished update is therefore a
// fixed number of PWM periods: about 3.5 with full-period capture and about 3
// with half-period capture (the capture time itself depends on the duties).
//
// The block structure, the synchronous update rule and the 62.5 us step follow
// the published design; the register port replacing its PCI bus, the clock
// and all widths are this design's choices.
//
// Clock: one clock for everything (40 MHz assumed for the defaults); the PWM
// inputs are asynchronous and synchronised inside. Reset: asynchronous,
// active low.
module hil_fpga_top
  import hil_pkg::*;
#(
  parameter int unsigned TPWM_RESET = TPWM_DEFAULT,  // cycles per PWM period
  parameter int unsigned CNT_BITS   = 12,            // encoder counts per turn, log2
  parameter int unsigned TN_CYCLES  = 1              // encoder step T_n, cycles
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // MCU gate signals
  input  logic [NPHASE-1:0]            pwm_top,
  input  logic [NPHASE-1:0]            pwm_bot,
  // to the MCU's encoder timer
  output logic                         enc_a,
  output logic                         enc_b,
  output logic                         enc_z,
  // to the external DACs (current transducer emulation)
  output logic [NPHASE-1:0][DAC_W-1:0] dac_code,
  output logic                         dac_load,
  // host (real-time processor) register port
  input  logic [ADDR_W-1:0]            host_addr,
  input  logic                         host_wr,
  input  logic [31:0]                  host_wdata,
  input  logic                         host_rd,
  output logic [31:0]                  host_rdata,
  output logic                         host_rvalid,
  output logic                         host_irq
);
  cap_mode_e          cfg_mode;
  ticks_t             cfg_tpwm, cfg_nsteps;
  logic signed [15:0] cfg_dac_gain;
  logic [DAC_W-1:0]   cfg_dac_ofs;

  logic                cap_event;
  duty_t  [NPHASE-1:0] duty;
  ticks_t [NPHASE-1:0] dead;
  ticks_t              tpwm_meas;

  model_result_t       host_result, upd_result;
  logic                sim_done, update, pending;
  logic [CNT_W-1:0]    late_cnt, overrun_cnt;

  theta_t              theta_n;
  logic                seg_active;

  pwm_duty_capture u_cap (
    .clk      (clk),
    .rst_n    (rst_n),
    .pwm_top  (pwm_top),
    .pwm_bot  (pwm_bot),
    .mode     (cfg_mode),
    .tpwm     (cfg_tpwm),
    .cap_event(cap_event),
    .duty     (duty),
    .dead     (dead),
    .tpwm_meas(tpwm_meas)
  );

  host_regs #(
    .TPWM_RESET  (TPWM_RESET),
    .NSTEPS_RESET(TPWM_RESET / TN_CYCLES)
  ) u_regs (
    .clk         (clk),
    .rst_n       (rst_n),
    .addr        (host_addr),
    .wr_en       (host_wr),
    .wdata       (host_wdata),
    .rd_en       (host_rd),
    .rdata       (host_rdata),
    .rd_valid    (host_rvalid),
    .irq         (host_irq),
    .cfg_mode    (cfg_mode),
    .cfg_tpwm    (cfg_tpwm),
    .cfg_nsteps  (cfg_nsteps),
    .cfg_dac_gain(cfg_dac_gain),
    .cfg_dac_ofs (cfg_dac_ofs),
    .result      (host_result),
    .sim_done    (sim_done),
    .cap_event   (cap_event),
    .duty        (duty),
    .dead        (dead),
    .tpwm_meas   (tpwm_meas),
    .pending     (pending),
    .late_cnt    (late_cnt),
    .overrun_cnt (overrun_cnt)
  );

  result_update_sync u_sync (
    .clk        (clk),
    .rst_n      (rst_n),
    .cap_event  (cap_event),
    .sim_done   (sim_done),
    .result_in  (host_result),
    .update     (update),
    .result_out (upd_result),
    .pending    (pending),
    .late_cnt   (late_cnt),
    .overrun_cnt(overrun_cnt)
  );

  encoder_pulse_gen #(
    .CNT_BITS (CNT_BITS),
    .TN_CYCLES(TN_CYCLES)
  ) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .update    (update),
    .theta_in  (upd_result.theta),
    .nsteps    (cfg_nsteps),
    .theta_n   (theta_n),
    .seg_active(seg_active),
    .enc_a     (enc_a),
    .enc_b     (enc_b),
    .enc_z     (enc_z)
  );

  dac_interface u_dac (
    .clk     (clk),
    .rst_n   (rst_n),
    .update  (update),
    .cur_in  (upd_result.cur),
    .gain    (cfg_dac_gain),
    .offset  (cfg_dac_ofs),
    .dac_code(dac_code),
    .dac_load(dac_load)
  );
endmodule
