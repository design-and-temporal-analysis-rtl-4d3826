// dac_interface: turns the model's three phase currents into codes for the
// digital-to-analog converters that stand in for the current transducers.
//
// The currents are not passed on when the model finishes but latched on the
// same update pulse that hands the new position to the encoder pulse
// generator, so that current and position seen by the MCU belong to the same
// model step. The code follows a linear transducer characteristic
//     code = offset + (gain * i) >>> 8        (gain signed Q8.8)
// saturated to 0 .. 2^DAC_W - 1. The characteristic's form, the Q8.8 gain and
// the DAC width are this design's choices; the source design only says the
// output is fitted to the transducer.
//
// After reset every code is mid-scale.
// Timing: codes change one cycle after update; dac_load pulses in that same
// cycle to tell the converters to take the new codes.
module dac_interface
  import hil_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            update,
  input  logic [NPHASE-1:0][CUR_W-1:0]    cur_in,    // signed currents
  input  logic signed [15:0]              gain,      // Q8.8
  input  logic [DAC_W-1:0]                offset,    // code at zero current
  output logic [NPHASE-1:0][DAC_W-1:0]    dac_code,
  output logic                            dac_load
);
  localparam int unsigned PW = CUR_W + 16;   // product width
  localparam int unsigned SW = PW - 8 + 1;   // scaled value plus offset

  logic [NPHASE-1:0][DAC_W-1:0] code_next;

  always_comb begin
    for (int p = 0; p < NPHASE; p++) begin
      logic signed [PW-1:0] prod;
      logic signed [SW-1:0] val;
      prod = $signed(cur_in[p]) * gain;
      val  = SW'(prod >>> 8) + $signed(SW'(offset));
      if (val < 0)
        code_next[p] = '0;
      else if (val > $signed(SW'({DAC_W{1'b1}})))
        code_next[p] = '1;
      else
        code_next[p] = val[DAC_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_code <= {NPHASE{DAC_W'(1) << (DAC_W - 1)}};
      dac_load <= 1'b0;
    end else begin
      dac_load <= update;
      if (update) dac_code <= code_next;
    end
  end
endmodule
