// encoder_pulse_gen: incremental encoder emulation for the HIL simulator.
//
// The real-time model delivers a rotor position theta_m once per model step
// T_m. To give the MCU's encoder timer a smooth pulse train, this block
// produces a finer position theta_n every encoder step T_n by linear
// interpolation between the last two model positions (Eq. 6):
//     theta_n = theta_(m-1) + (theta_m - theta_(m-1)) / N * n,  n = 0..N-1
// and reaches theta_m exactly at n = N (Eq. 7), where N = T_m / T_n. This
// adds one model step of delay but has no jump when the speed changes; the
// extrapolating alternative is not built.
//
// Position is an unsigned fraction of a turn, so the difference of two
// positions taken modulo 2^THETA_W is the signed travel (less than half a
// turn per model step). Division by N is replaced by a multiplication with
// recip = floor(2^32 / N), computed by a sequential divider after reset and
// after every change of N (THETA_W + 1 cycles); the step is kept with FRAC
// extra fractional bits and the segment ends on theta_m exactly.
//
// The top CNT_BITS bits of theta_n are the quadrature count (4 * lines per
// turn). Its two low bits step through the Gray sequence
//   (A,B) = 10, 11, 01, 00   for counts 0, 1, 2, 3 (mod 4)
// so A leads B when the count rises, and Z is high while the count is 0,
// once per turn. Line count, sequence phase and Z width are this design's
// choices. Outputs are registered: one cycle after theta_n changes.
//
// Interface: update pulses for one cycle with the new theta_in; tn_tick
// comes from an internal prescaler of TN_CYCLES clock cycles.
module encoder_pulse_gen
  import hil_pkg::*;
#(
  parameter int unsigned CNT_BITS  = 12,  // 1024 lines -> 4096 counts per turn
  parameter int unsigned TN_CYCLES = 1,   // encoder step T_n in clock cycles
  parameter int unsigned FRAC      = 16   // extra fraction bits of the step
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   update,         // new model position (t_m^u)
  input  theta_t theta_in,
  input  ticks_t nsteps,         // N, at least 2
  output theta_t theta_n,        // interpolated position
  output logic   seg_active,     // interpolation segment running
  output logic   enc_a,
  output logic   enc_b,
  output logic   enc_z
);
  localparam int unsigned RW = THETA_W + 1;        // recip width
  localparam int unsigned AW = THETA_W + FRAC;     // accumulator width

  // ---- reciprocal of N ---------------------------------------------------
  ticks_t        n_seen;
  logic          rc_start, rc_busy, rc_done, rc_init;
  logic [RW-1:0] rc_q;
  logic [THETA_W-1:0] recip;

  assign rc_start = !rc_busy && (!rc_init || nsteps != n_seen);

  udiv_seq #(.NW(RW), .DW(TS_W)) u_recip (
    .clk  (clk),
    .rst_n(rst_n),
    .start(rc_start),
    .n    ({1'b1, {THETA_W{1'b0}}}),
    .d    (nsteps),
    .busy (rc_busy),
    .done (rc_done),
    .q    (rc_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_seen  <= '0;
      rc_init <= 1'b0;
      recip   <= '0;
    end else begin
      if (rc_start) begin
        n_seen  <= nsteps;
        rc_init <= 1'b1;
      end
      if (rc_done) recip <= rc_q[RW-1] ? '1 : rc_q[THETA_W-1:0];
    end
  end

  // ---- step for a new segment ---------------------------------------------
  theta_t                         theta_tgt;     // theta_m
  logic signed [THETA_W-1:0]      delta;
  logic signed [2*THETA_W+1:0]    prod;
  logic signed [AW-1:0]           step_new;

  assign delta    = $signed(theta_in - theta_tgt);
  assign prod     = delta * $signed({2'b00, recip});
  assign step_new = prod[THETA_W+AW-1-FRAC -: AW];

  // ---- T_n prescaler ------------------------------------------------------
  localparam int unsigned PW = (TN_CYCLES > 1) ? $clog2(TN_CYCLES) : 1;
  logic [PW-1:0] pre;
  logic          tn_tick;

  assign tn_tick = (TN_CYCLES <= 1) || (pre == PW'(TN_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pre <= '0;
    else if (tn_tick) pre <= '0;
    else              pre <= pre + 1'b1;
  end

  // ---- interpolation --------------------------------------------------------
  logic [AW-1:0]        acc;       // theta_n with FRAC fraction bits
  logic signed [AW-1:0] step;
  ticks_t               n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta_tgt  <= '0;
      acc        <= '0;
      step       <= '0;
      n          <= '0;
      seg_active <= 1'b0;
    end else if (update) begin
      // new segment starts at the previous target theta_(m-1)
      theta_tgt  <= theta_in;
      acc        <= {theta_tgt, {FRAC{1'b0}}};
      step       <= step_new;
      n          <= '0;
      seg_active <= 1'b1;
    end else if (seg_active && tn_tick) begin
      if (n + 1'b1 >= nsteps) begin
        acc        <= {theta_tgt, {FRAC{1'b0}}};
        n          <= nsteps;
        seg_active <= 1'b0;
      end else begin
        acc <= acc + AW'(step);
        n   <= n + 1'b1;
      end
    end
  end

  assign theta_n = acc[AW-1 -: THETA_W];

  // ---- quadrature outputs ---------------------------------------------------
  logic [CNT_BITS-1:0] count;
  assign count = theta_n[THETA_W-1 -: CNT_BITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_a <= 1'b1;
      enc_b <= 1'b0;
      enc_z <= 1'b1;
    end else begin
      unique case (count[1:0])
        2'd0: {enc_a, enc_b} <= 2'b10;
        2'd1: {enc_a, enc_b} <= 2'b11;
        2'd2: {enc_a, enc_b} <= 2'b01;
        2'd3: {enc_a, enc_b} <= 2'b00;
      endcase
      enc_z <= (count == '0);
    end
  end
endmodule
