// tb_host_regs: self-checking test of the host register bank.
//
// Checks through the register port: reset values of the configuration, write
// and read-back of every writable register, read-only status registers
// reflecting their inputs, the PwmLoad flag (set by a capture event, raising
// irq, counted, cleared by writing 1 to STATUS bit 0, and not lost when an
// event and the clear meet), the one-cycle SimDone pulse, read latency of one
// cycle and zero from an unmapped address.
module tb_host_regs;
  import hil_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0]  addr;
  logic               wr_en, rd_en, rd_valid, irq, sim_done, cap_event, pending;
  logic [31:0]        wdata, rdata;
  cap_mode_e          cfg_mode;
  ticks_t             cfg_tpwm, cfg_nsteps, tpwm_meas;
  logic signed [15:0] cfg_dac_gain;
  logic [DAC_W-1:0]   cfg_dac_ofs;
  model_result_t      result;
  duty_t  [2:0]       duty;
  ticks_t [2:0]       dead;
  logic [CNT_W-1:0]   late_cnt, overrun_cnt;

  host_regs #(.TPWM_RESET(2500), .NSTEPS_RESET(2500)) dut (
    .clk(clk), .rst_n(rst_n), .addr(addr), .wr_en(wr_en), .wdata(wdata),
    .rd_en(rd_en), .rdata(rdata), .rd_valid(rd_valid), .irq(irq),
    .cfg_mode(cfg_mode), .cfg_tpwm(cfg_tpwm), .cfg_nsteps(cfg_nsteps),
    .cfg_dac_gain(cfg_dac_gain), .cfg_dac_ofs(cfg_dac_ofs), .result(result),
    .sim_done(sim_done), .cap_event(cap_event), .duty(duty), .dead(dead),
    .tpwm_meas(tpwm_meas), .pending(pending), .late_cnt(late_cnt),
    .overrun_cnt(overrun_cnt));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); addr = ADDR_W'(a); wdata = d; wr_en = 1;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); addr = ADDR_W'(a); rd_en = 1;
    @(negedge clk); rd_en = 0;
    check(rd_valid, "rd_valid one cycle after rd_en");
    d = rdata;
  endtask

  int sd_pulses = 0;
  always @(posedge clk) if (rst_n && sim_done) sd_pulses++;

  initial begin
    logic [31:0] d;
    addr = 0; wr_en = 0; rd_en = 0; wdata = 0; cap_event = 0; pending = 0;
    duty = '0; dead = '0; tpwm_meas = '0; late_cnt = '0; overrun_cnt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(cfg_tpwm == 2500 && cfg_nsteps == 2500, "reset period and N");
    check(cfg_mode == CAP_HALF, "reset capture method");
    check(cfg_dac_gain == 16'sh0100 && cfg_dac_ofs == 16'h8000, "reset DAC characteristic");
    check(!irq, "no irq after reset");
    // writable registers
    for (int k = 0; k < 20; k++) begin
      logic [31:0] v;
      v = $urandom;
      wr(REG_TPWM, v);    rd(REG_TPWM, d);    check(d == {16'b0, v[15:0]} && cfg_tpwm == v[15:0], "TPWM");
      wr(REG_NSTEPS, v);  rd(REG_NSTEPS, d);  check(d == {16'b0, v[15:0]} && cfg_nsteps == v[15:0], "NSTEPS");
      wr(REG_CTRL, v);    rd(REG_CTRL, d);    check(d == {31'b0, v[0]} && cfg_mode == cap_mode_e'(v[0]), "CTRL");
      wr(REG_THETA, v);   rd(REG_THETA, d);   check(d == v && result.theta == v, "THETA");
      wr(REG_CUR_A, v);   rd(REG_CUR_A, d);   check(d == 32'($signed(v[15:0])) && result.cur[0] == v[15:0], "CUR_A");
      wr(REG_CUR_B, ~v);  rd(REG_CUR_B, d);   check(result.cur[1] == ~v[15:0], "CUR_B");
      wr(REG_CUR_C, v+1); rd(REG_CUR_C, d);   check(result.cur[2] == 16'(v+1), "CUR_C");
      wr(REG_DAC_GAIN, v); rd(REG_DAC_GAIN, d); check(cfg_dac_gain == v[15:0], "DAC_GAIN");
      wr(REG_DAC_OFS, v);  rd(REG_DAC_OFS, d);  check(d == {16'b0, v[15:0]} && cfg_dac_ofs == v[15:0], "DAC_OFS");
      // status inputs
      duty[k % 3] = 16'($urandom); dead[k % 3] = 16'($urandom);
      tpwm_meas = 16'($urandom); late_cnt = 16'($urandom); overrun_cnt = 16'($urandom);
      rd(REG_DUTY_A + k % 3, d);  check(d == {16'b0, duty[k % 3]}, "DUTY");
      rd(REG_DEAD_A + k % 3, d);  check(d == {16'b0, dead[k % 3]}, "DEAD");
      rd(REG_TPWM_MEAS, d);       check(d == {16'b0, tpwm_meas}, "TPWM_MEAS");
      rd(REG_LATE, d);            check(d == {16'b0, late_cnt}, "LATE");
      rd(REG_OVERRUN, d);         check(d == {16'b0, overrun_cnt}, "OVERRUN");
    end
    rd(5'h1F, d); check(d == 0, "unmapped reads zero");
    // PwmLoad flag
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); cap_event = 1; @(negedge clk); cap_event = 0;
      check(irq, "irq after capture event");
      pending = k[0];
      rd(REG_STATUS, d); check(d == {30'b0, pending, 1'b1}, "STATUS flag set");
      wr(REG_STATUS, 32'h1);
      check(!irq, "flag cleared");
    end
    // event in the same cycle as the clear wins
    @(negedge clk); addr = REG_STATUS; wdata = 1; wr_en = 1; cap_event = 1;
    @(negedge clk); wr_en = 0; cap_event = 0;
    check(irq, "event not lost against clear");
    rd(REG_EVENTS, d); check(d == 6, $sformatf("event count %0d", d));
    // SimDone pulse
    wr(REG_SIMDONE, 0);
    @(negedge clk);
    check(sd_pulses == 1, "one SimDone pulse per write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
