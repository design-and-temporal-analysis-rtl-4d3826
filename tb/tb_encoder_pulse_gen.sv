// tb_encoder_pulse_gen: self-checking test of the encoder pulse generator.
//
// Positions arrive once every N clock cycles, as model steps would, with
// random forward and backward travel of at most one count per step, across the 2*pi wrap, and with a change
// of N in the middle. Checked against values computed here:
//   * theta_n after k encoder steps equals theta_(m-1) + delta*k/N within a
//     small rounding tolerance, and equals theta_m exactly at k = N (Eq. 7);
//   * a quadrature decoder on A/B never sees an illegal double step, and its
//     count matches the top bits of theta_m at the end of every segment;
//   * Z is high exactly when the count is zero.
module tb_encoder_pulse_gen;
  import hil_pkg::*;

  localparam int CNT_BITS = 12;
  localparam longint TURN = 64'd1 << 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   update;
  theta_t theta_in, theta_n;
  ticks_t nsteps;
  logic   seg_active, enc_a, enc_b, enc_z;

  encoder_pulse_gen #(.CNT_BITS(CNT_BITS), .TN_CYCLES(1)) dut (
    .clk(clk), .rst_n(rst_n), .update(update), .theta_in(theta_in),
    .nsteps(nsteps), .theta_n(theta_n), .seg_active(seg_active),
    .enc_a(enc_a), .enc_b(enc_b), .enc_z(enc_z));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // quadrature decoder
  function automatic int qstate(input logic a, input logic b);
    case ({a, b})
      2'b10:   return 0;
      2'b11:   return 1;
      2'b01:   return 2;
      default: return 3;
    endcase
  endfunction

  int dec_cnt = 0, last_q = 0, illegal = 0, zpulses = 0, zbad = 0, wraps = 0;
  logic a_q = 1, b_q = 0;
  always @(posedge clk) if (rst_n) begin
    int q, d;
    q = qstate(enc_a, enc_b);
    d = (q - last_q + 4) % 4;
    if (d == 1) dec_cnt = (dec_cnt + 1) % (1 << CNT_BITS);
    else if (d == 3) dec_cnt = (dec_cnt + (1 << CNT_BITS) - 1) % (1 << CNT_BITS);
    else if (d == 2) illegal++;
    last_q = q;
    if (enc_z) zpulses++;
    if (enc_z != (dec_cnt == 0)) zbad++;
  end

  theta_t prev_tgt;
  task automatic segment(input theta_t tgt, input int n);
    longint delta;
    @(negedge clk);
    update = 1; theta_in = tgt;
    @(negedge clk);
    update = 0;
    delta = longint'($signed(tgt - prev_tgt));
    // after the update edge theta_n = prev target, k = 0
    for (int k = 0; k < n; k++) begin
      longint expv, err;
      expv = (longint'(prev_tgt) + (delta * k) / n) % TURN;
      if (expv < 0) expv += TURN;
      err = longint'(theta_n) - expv;
      if (err > TURN / 2) err -= TURN;
      if (err < -TURN / 2) err += TURN;
      if (k % 17 == 0) check(err >= -2048 && err <= 2048,
        $sformatf("theta_n %h k=%0d expected %h", theta_n, k, expv));
      @(negedge clk);
    end
    check(theta_n == tgt, $sformatf("segment end %h expected %h", theta_n, tgt));
    check(!seg_active, "segment finished");
    repeat (2) @(negedge clk);
    check(dec_cnt == int'(tgt[31 -: CNT_BITS]),
          $sformatf("decoded count %0d expected %0d", dec_cnt, tgt[31 -: CNT_BITS]));
    if (tgt < prev_tgt && delta > 0) wraps++;
    if (tgt > prev_tgt && delta < 0) wraps++;
    prev_tgt = tgt;
  endtask

  initial begin
    update = 0; theta_in = '0; nsteps = 100; prev_tgt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (60) @(posedge clk);           // reciprocal of N ready
    // forward across the wrap
    segment(32'h0200_0000, 100);
    segment(32'hFE00_0000, 100);          // backwards, through zero
    for (int i = 0; i < 8; i++) segment(prev_tgt + 32'h0300_0000, 100);
    for (int i = 0; i < 20; i++) begin
      int d;
      d = int'($urandom_range(0, 32'h0600_0000)) - 32'h0300_0000;
      segment(prev_tgt + theta_t'(d), 100);
    end
    // new N
    nsteps = 50;
    repeat (60) @(posedge clk);
    for (int i = 0; i < 10; i++) segment(prev_tgt - 32'h0100_0000, 50);
    check(illegal == 0, $sformatf("%0d illegal quadrature steps", illegal));
    check(zbad == 0, $sformatf("%0d cycles with wrong Z", zbad));
    check(zpulses > 0 && wraps > 0, "index pulse seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
