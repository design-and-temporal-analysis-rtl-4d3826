// udiv_seq: sequential restoring divider, one quotient bit per clock.
//
// A start pulse loads numerator n and denominator d; NW cycles later done
// pulses for one cycle and q holds floor(n/d) until the next start. Division
// by zero returns all ones. start while busy is not allowed. Used for the
// duty ratio (on-time over period) and for the interpolation reciprocal; the
// choice of a serial divider is this design's, not the source's.
module udiv_seq #(
  parameter int unsigned NW = 32,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n,
  input  logic [DW-1:0] d,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] q
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] sh;       // numerator bits shift out, quotient bits shift in
  logic [DW-1:0] r;        // partial remainder, always below d
  logic [DW-1:0] dd;
  logic [CW-1:0] left;
  logic [DW:0]   trial;

  assign trial = {r, sh[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      r    <= '0;
      dd   <= '0;
      left <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      q    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        sh   <= n;
        r    <= '0;
        dd   <= d;
        left <= CW'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, dd}) begin
          r  <= DW'(trial - {1'b0, dd});
          sh <= {sh[NW-2:0], 1'b1};
        end else begin
          r  <= trial[DW-1:0];
          sh <= {sh[NW-2:0], 1'b0};
        end
        left <= left - 1'b1;
        if (left == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          q    <= (trial >= {1'b0, dd}) ? {sh[NW-2:0], 1'b1} : {sh[NW-2:0], 1'b0};
        end
      end
    end
  end

  // A new division may only start once the previous one has finished.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
