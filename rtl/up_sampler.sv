// up_sampler: raises the chip stream of one quadrature channel to the sample
// rate by zero stuffing.
//
// Each chip arriving with in_valid becomes one bipolar impulse (chip 1 -> +1,
// chip 0 -> -1) followed by zeros until the next chip; the pulse-shaping FIR
// behind it then fills in the pulse. With chips arriving every L = 8 clocks
// (1 MHz chips, 8 MHz samples) this is up-sampling by 8. The bipolar mapping
// and zero stuffing are this design's reading of "up sampled to match the
// Nyquist criteria". An assertion checks that chips never come closer than
// L clocks apart.
//
// Ports: in_valid/in_chip; sample (2-bit signed, registered, one per clock),
// phase (clocks since the last impulse, saturating at L-1).
module up_sampler #(
  parameter int unsigned L = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic              in_chip,
  output logic signed [1:0] sample,
  output logic [$clog2(L)-1:0] phase
);

  always_ff @(posedge clk) begin
    if (rst) begin
      sample <= '0;
      phase  <= $clog2(L)'(L-1);
    end else if (in_valid) begin
      sample <= in_chip ? 2'sd1 : -2'sd1;
      phase  <= '0;
    end else begin
      sample <= '0;
      if (phase != $clog2(L)'(L-1)) phase <= phase + 1'b1;
    end
  end

  // A new chip may only come after L-1 stuffed zeros.
  a_chip_spacing: assert property (@(posedge clk) disable iff (rst)
    in_valid |-> phase == $clog2(L)'(L-1));

endmodule
