// host_regs: register bank through which the real-time processor talks to
// the FPGA (the FPGA side of the bus in the HIL simulator).
//
// It holds what the host software needs per model step: the PwmLoad flag and
// the captured duties to read, the position and current results and the
// SimDone flag to write, plus configuration (capture method, PWM period,
// interpolation steps N, DAC characteristic) and diagnostics. The register
// map is in hil_pkg. The PwmLoad flag is set by each capture event, drives
// irq, and is cleared by writing 1 to STATUS bit 0. A write to SIMDONE pulses
// sim_done for one cycle, after the result registers have been written.
//
// Port protocol (this design's choice; the source design uses PCI, whose bus
// core is not part of this RTL): one access per cycle, wr_en with addr/wdata
// writes at the clock edge; rd_en returns rdata with rd_valid one cycle
// later. Unmapped addresses read as zero.
module host_regs
  import hil_pkg::*;
#(
  parameter int unsigned TPWM_RESET   = TPWM_DEFAULT,
  parameter int unsigned NSTEPS_RESET = TPWM_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host port
  input  logic [ADDR_W-1:0]    addr,
  input  logic                 wr_en,
  input  logic [31:0]          wdata,
  input  logic                 rd_en,
  output logic [31:0]          rdata,
  output logic                 rd_valid,
  output logic                 irq,
  // configuration
  output cap_mode_e            cfg_mode,
  output ticks_t               cfg_tpwm,
  output ticks_t               cfg_nsteps,
  output logic signed [15:0]   cfg_dac_gain,
  output logic [DAC_W-1:0]     cfg_dac_ofs,
  // model results
  output model_result_t        result,
  output logic                 sim_done,
  // status in
  input  logic                 cap_event,
  input  duty_t  [NPHASE-1:0]  duty,
  input  ticks_t [NPHASE-1:0]  dead,
  input  ticks_t               tpwm_meas,
  input  logic                 pending,
  input  logic [CNT_W-1:0]     late_cnt,
  input  logic [CNT_W-1:0]     overrun_cnt
);
  logic             load_flag;
  logic [CNT_W-1:0] events;
  reg_addr_e        a;

  assign a   = reg_addr_e'(addr);
  assign irq = load_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_mode     <= CAP_HALF;
      cfg_tpwm     <= ticks_t'(TPWM_RESET);
      cfg_nsteps   <= ticks_t'(NSTEPS_RESET);
      cfg_dac_gain <= 16'sh0100;
      cfg_dac_ofs  <= DAC_W'(1) << (DAC_W - 1);
      result       <= '0;
      sim_done     <= 1'b0;
      load_flag    <= 1'b0;
      events       <= '0;
    end else begin
      sim_done <= 1'b0;
      if (cap_event) begin
        load_flag <= 1'b1;
        events    <= events + 1'b1;
      end
      if (wr_en) begin
        unique case (a)
          REG_CTRL:     cfg_mode      <= cap_mode_e'(wdata[0]);
          REG_TPWM:     cfg_tpwm      <= wdata[TS_W-1:0];
          REG_NSTEPS:   cfg_nsteps    <= wdata[TS_W-1:0];
          REG_STATUS:   if (wdata[0] && !cap_event) load_flag <= 1'b0;
          REG_THETA:    result.theta  <= wdata[THETA_W-1:0];
          REG_CUR_A:    result.cur[0] <= wdata[CUR_W-1:0];
          REG_CUR_B:    result.cur[1] <= wdata[CUR_W-1:0];
          REG_CUR_C:    result.cur[2] <= wdata[CUR_W-1:0];
          REG_SIMDONE:  sim_done      <= 1'b1;
          REG_DAC_GAIN: cfg_dac_gain  <= wdata[15:0];
          REG_DAC_OFS:  cfg_dac_ofs   <= wdata[DAC_W-1:0];
          default: ;
        endcase
      end
    end
  end

  // read port
  logic [31:0] rmux;
  always_comb begin
    unique case (a)
      REG_CTRL:      rmux = 32'(cfg_mode);
      REG_TPWM:      rmux = 32'(cfg_tpwm);
      REG_NSTEPS:    rmux = 32'(cfg_nsteps);
      REG_STATUS:    rmux = {30'b0, pending, load_flag};
      REG_DUTY_A:    rmux = 32'(duty[0]);
      REG_DUTY_B:    rmux = 32'(duty[1]);
      REG_DUTY_C:    rmux = 32'(duty[2]);
      REG_DEAD_A:    rmux = 32'(dead[0]);
      REG_DEAD_B:    rmux = 32'(dead[1]);
      REG_DEAD_C:    rmux = 32'(dead[2]);
      REG_TPWM_MEAS: rmux = 32'(tpwm_meas);
      REG_EVENTS:    rmux = 32'(events);
      REG_LATE:      rmux = 32'(late_cnt);
      REG_OVERRUN:   rmux = 32'(overrun_cnt);
      REG_THETA:     rmux = 32'(result.theta);
      REG_CUR_A:     rmux = 32'($signed(result.cur[0]));
      REG_CUR_B:     rmux = 32'($signed(result.cur[1]));
      REG_CUR_C:     rmux = 32'($signed(result.cur[2]));
      REG_DAC_GAIN:  rmux = 32'(cfg_dac_gain);
      REG_DAC_OFS:   rmux = 32'(cfg_dac_ofs);
      default:       rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) rdata <= rmux;
    end
  end

  // one access per cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && rd_en));
endmodule
