// result_update_sync: the fixed update point of the synchronous HIL
// configuration.
//
// Every capture event (PwmLoad, t_k^c) starts one execution of the real-time
// model. When the model has written its results it raises SimDone (t_m^e).
// Instead of passing the results on at once, this block keeps them in a
// holding register and releases them at the next capture event, one PWM
// period after the execution started. The wait, T_eu = T_pwm - T_ae, makes the
// update instant independent of the execution time T_ae, so the total
// response stays a fixed number of PWM periods.
//
// On release, update pulses for one cycle with the held result set, which
// goes to the encoder pulse generator and the DAC interface together, keeping
// position and currents synchronised. A SimDone in the same cycle as the
// event is still in time and is released directly.
//
// Diagnostics (this design's additions): late counts events at which a model
// step had been started but no result had arrived (the WCET exceeded a PWM
// period; outputs then hold their previous values), overrun counts results
// replaced by a newer SimDone before being released.
module result_update_sync
  import hil_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cap_event,     // PwmLoad event, t_k^c
  input  logic          sim_done,      // model results complete, t_m^e
  input  model_result_t result_in,     // results written by the model
  output logic          update,        // t_m^u, one cycle
  output model_result_t result_out,    // valid from update
  output logic          pending,       // result held, waiting for the event
  output logic [CNT_W-1:0] late_cnt,
  output logic [CNT_W-1:0] overrun_cnt
);
  model_result_t held;
  logic          started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held        <= '0;
      pending     <= 1'b0;
      started     <= 1'b0;
      update      <= 1'b0;
      result_out  <= '0;
      late_cnt    <= '0;
      overrun_cnt <= '0;
    end else begin
      update <= 1'b0;
      if (cap_event) begin
        started <= 1'b1;
        if (sim_done) begin
          update     <= 1'b1;
          result_out <= result_in;
          pending    <= 1'b0;
          if (pending) overrun_cnt <= overrun_cnt + 1'b1;
        end else if (pending) begin
          update     <= 1'b1;
          result_out <= held;
          pending    <= 1'b0;
        end else if (started) begin
          late_cnt <= late_cnt + 1'b1;
        end
      end else if (sim_done) begin
        if (pending) overrun_cnt <= overrun_cnt + 1'b1;
        held    <= result_in;
        pending <= 1'b1;
      end
    end
  end

  // update only ever follows a capture event
  assert property (@(posedge clk) disable iff (!rst_n) update |-> $past(cap_event));
endmodule
