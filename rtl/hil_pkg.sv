// hil_pkg: types, widths and the register map shared by the FPGA side of the
// signal-level hardware-in-the-loop (HIL) simulator for a motor control unit.
//
// Widths: the source design gives no word lengths, so all of these are this
// design's choices. Times are counted in FPGA clock cycles (40 MHz assumed, so
// the 62.5 us PWM period of the reference setup is 2500 cycles). Duty ratios
// are unsigned Q1.15 (1.0 = 0x8000). Rotor position is an unsigned fraction of
// one mechanical turn in THETA_W bits, so it wraps at 2*pi by itself. Phase
// currents are signed CUR_W-bit fixed-point numbers whose scale is set by the
// software that converts them to and from floating point.
package hil_pkg;

  localparam int unsigned NPHASE    = 3;
  localparam int unsigned TS_W      = 16;  // cycle counters and interval lengths
  localparam int unsigned DUTY_W    = 16;  // Q1.15 duty ratio
  localparam int unsigned DUTY_FRAC = 15;
  localparam int unsigned THETA_W   = 32;  // position, fraction of one turn
  localparam int unsigned CUR_W     = 16;  // signed phase current
  localparam int unsigned DAC_W     = 16;  // DAC code width
  localparam int unsigned CNT_W     = 16;  // event and error counters

  // Default PWM period in clock cycles: 62.5 us at 40 MHz.
  localparam int unsigned TPWM_DEFAULT = 2500;

  // Duty capture method (Sec. "PWM duty capture"):
  //   CAP_FULL : duty = 1 - Toff/Tpwm, valid at the end of the off interval
  //   CAP_HALF : duty/2 from the first half of the on pulse after reload
  typedef enum logic {
    CAP_FULL = 1'b0,
    CAP_HALF = 1'b1
  } cap_mode_e;

  typedef logic        [DUTY_W-1:0]  duty_t;
  typedef logic        [TS_W-1:0]    ticks_t;
  typedef logic        [THETA_W-1:0] theta_t;
  typedef logic signed [CUR_W-1:0]   cur_t;

  // One result set of the real-time model: position and three phase currents.
  typedef struct packed {
    theta_t                  theta;
    logic [NPHASE-1:0][CUR_W-1:0] cur;
  } model_result_t;

  // Register map of the host port (word addresses).
  localparam int unsigned ADDR_W = 5;
  typedef enum logic [ADDR_W-1:0] {
    REG_CTRL      = 5'h00,  // RW  bit0: capture method (1 = half period)
    REG_TPWM      = 5'h01,  // RW  PWM period in cycles, used by the duty formulas
    REG_NSTEPS    = 5'h02,  // RW  N = Tm/Tn, interpolation steps per model step
    REG_STATUS    = 5'h03,  // R   bit0 PwmLoad flag, bit1 result pending; W1C bit0
    REG_DUTY_A    = 5'h04,  // R   Q1.15 duty of phase A (B, C follow)
    REG_DUTY_B    = 5'h05,
    REG_DUTY_C    = 5'h06,
    REG_DEAD_A    = 5'h07,  // R   dead-time measure of phase A (B, C follow)
    REG_DEAD_B    = 5'h08,
    REG_DEAD_C    = 5'h09,
    REG_TPWM_MEAS = 5'h0A,  // R   measured PWM period of phase A
    REG_EVENTS    = 5'h0B,  // R   number of capture events
    REG_LATE      = 5'h0C,  // R   capture events with no model result ready
    REG_OVERRUN   = 5'h0D,  // R   results replaced before they were used
    REG_THETA     = 5'h0E,  // RW  model result: position
    REG_CUR_A     = 5'h0F,  // RW  model result: phase currents
    REG_CUR_B     = 5'h10,
    REG_CUR_C     = 5'h11,
    REG_SIMDONE   = 5'h12,  // W   any write: results complete (SimDone flag)
    REG_DAC_GAIN  = 5'h13,  // RW  signed Q8.8 gain current -> DAC code
    REG_DAC_OFS   = 5'h14   // RW  DAC code for zero current
  } reg_addr_e;

endpackage
