// tb_dac_interface: self-checking test of the current-to-DAC-code block.
//
// Random currents, gains and offsets, including values that saturate at both
// ends. Checks: codes equal clamp(offset + floor(gain*i / 256)) computed
// here, they change only on update (one cycle later, with dac_load), and all
// three phases are mid-scale after reset.
module tb_dac_interface;
  import hil_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                         update;
  logic [2:0][CUR_W-1:0]        cur_in;
  logic signed [15:0]           gain;
  logic [DAC_W-1:0]             offset;
  logic [2:0][DAC_W-1:0]        dac_code;
  logic                         dac_load;

  dac_interface dut (.clk(clk), .rst_n(rst_n), .update(update), .cur_in(cur_in),
    .gain(gain), .offset(offset), .dac_code(dac_code), .dac_load(dac_load));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int model(input int i, input int g, input int o);
    longint v;
    v = longint'(o) + ((longint'(i) * g) >>> 8);
    if (v < 0) v = 0;
    if (v > 65535) v = 65535;
    return int'(v);
  endfunction

  int exp_code [3];
  int sat_lo = 0, sat_hi = 0;

  initial begin
    update = 0; cur_in = '0; gain = 16'sh0100; offset = 16'h8000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 3; p++) check(dac_code[p] == 16'h8000, "mid-scale after reset");
    for (int t = 0; t < 300; t++) begin
      gain   = (t % 5 == 0) ? 16'sh0400 : 16'(int'($urandom_range(0, 16'h0300)) - 16'sh0100);
      offset = (t % 7 == 0) ? 16'h1000 : 16'h8000;
      for (int p = 0; p < 3; p++) begin
        cur_in[p] = 16'($urandom);
        exp_code[p] = model($signed(cur_in[p]), int'(gain), int'(offset));
        if (exp_code[p] == 0) sat_lo++;
        if (exp_code[p] == 65535) sat_hi++;
      end
      update = 1;
      @(negedge clk);
      update = 0;
      check(dac_load, "dac_load follows update");
      for (int p = 0; p < 3; p++)
        check(int'(dac_code[p]) == exp_code[p],
              $sformatf("phase %0d code %0d expected %0d", p, dac_code[p], exp_code[p]));
      // inputs change without update: codes must hold
      cur_in = '0; gain = 16'sh0001;
      repeat (2) @(negedge clk);
      check(!dac_load, "no load without update");
      for (int p = 0; p < 3; p++) check(int'(dac_code[p]) == exp_code[p], "code holds");
    end
    check(sat_lo > 0 && sat_hi > 0, "both saturation limits exercised");
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
