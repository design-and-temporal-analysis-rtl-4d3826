// tb_result_update_sync: self-checking test of the synchronous update point.
//
// Capture events come every PERIOD cycles; the model answer (SimDone) comes
// a random execution time after each event. Checks: results are released
// only at the next capture event and never at SimDone, the released set is
// the latest one written, an event with no result counts as late and leaves
// outputs alone, a second SimDone before release counts as overrun, and a
// SimDone in the same cycle as the event is released at once.
module tb_result_update_sync;
  import hil_pkg::*;

  localparam int PERIOD = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          cap_event, sim_done, update, pending;
  model_result_t result_in, result_out;
  logic [CNT_W-1:0] late_cnt, overrun_cnt;

  result_update_sync dut (.clk(clk), .rst_n(rst_n), .cap_event(cap_event),
    .sim_done(sim_done), .result_in(result_in), .update(update),
    .result_out(result_out), .pending(pending), .late_cnt(late_cnt),
    .overrun_cnt(overrun_cnt));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int cyc = 0, last_ev = -1, upd_cnt = 0, bad_time = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && update) begin
      upd_cnt++;
      if (last_ev != cyc - 1) bad_time++;
    end
    if (rst_n && cap_event) last_ev <= cyc;
  end

  model_result_t expect_out;
  int exp_late = 0, exp_over = 0;

  task automatic event_pulse;
    @(negedge clk); cap_event = 1; @(negedge clk); cap_event = 0;
  endtask

  task automatic done_pulse(input model_result_t r);
    @(negedge clk); result_in = r; sim_done = 1; @(negedge clk); sim_done = 0;
  endtask

  initial begin
    model_result_t r, r2, held_out;
    cap_event = 0; sim_done = 0; result_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    event_pulse();   // first step starts, nothing outstanding: not late
    for (int k = 0; k < 40; k++) begin
      int wait_c;
      r = model_result_t'({$urandom, $urandom, $urandom});
      wait_c = $urandom_range(20, PERIOD - 40);
      repeat (wait_c) @(negedge clk);
      if (k % 10 == 7) begin
        // model too slow: no result this period
        held_out = result_out;
        repeat (PERIOD - wait_c) @(negedge clk);
        event_pulse();
        exp_late++;
        check(result_out == held_out, "late step leaves outputs");
        continue;
      end
      if (k % 10 == 3) begin
        // two results before the event: the second one wins
        r2 = model_result_t'({$urandom, $urandom, $urandom});
        done_pulse(r2);
        exp_over++;
      end
      done_pulse(r);
      @(negedge clk);
      check(pending, "result pending after SimDone");
      check(result_out != r || k == 0, "not released at SimDone");
      repeat (PERIOD - wait_c) @(negedge clk);
      event_pulse();
      @(negedge clk);
      check(result_out == r, "released at the next event");
      check(!pending, "pending cleared");
    end
    // SimDone in the same cycle as the event
    r = model_result_t'({$urandom, $urandom, $urandom});
    @(negedge clk); result_in = r; sim_done = 1; cap_event = 1;
    @(negedge clk); sim_done = 0; cap_event = 0;
    @(negedge clk);
    check(result_out == r, "same-cycle SimDone released");
    check(late_cnt == CNT_W'(exp_late), $sformatf("late %0d expected %0d", late_cnt, exp_late));
    check(overrun_cnt == CNT_W'(exp_over), $sformatf("overrun %0d expected %0d", overrun_cnt, exp_over));
    check(bad_time == 0, "updates only right after events");
    check(upd_cnt == 40 - 4 + 1, $sformatf("%0d updates", upd_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
