// down_sampler: keeps one sample in M from the matched-filter output of one
// quadrature channel, the one at the peak of each chip.
//
// A sync pulse (from the receiver's timing acquisition, in the cycle the
// first sample of a chip is at the matched-filter input) restarts the phase
// counter and starts the decimation. The counter then runs modulo M and the
// sample present when it equals PHASE is passed on. PHASE = M-1 matches a
// registered M-tap matched filter: its output peaks M clocks after the first
// sample of the chip entered it. Decimating by 8 follows from the 8x
// up-sampling of the transmitter; the sync-driven phase is this design's
// own choice.
//
// Ports: sync, stop (ends decimation), din (W signed); dout/dout_valid
// (registered, one pulse per M clocks while running).
module down_sampler #(
  parameter int unsigned M     = 8,
  parameter int unsigned W     = 23,
  parameter int unsigned PHASE = M - 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sync,
  input  logic                stop,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout,
  output logic                dout_valid
);

  localparam int unsigned CNT_W = (M > 1) ? $clog2(M) : 1;

  logic [CNT_W-1:0] cnt_q;
  logic             run_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q      <= '0;
      run_q      <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (sync) begin
        cnt_q <= '0;
        run_q <= 1'b1;
      end else if (stop) begin
        run_q <= 1'b0;
      end else if (run_q) begin
        cnt_q <= (cnt_q == CNT_W'(M-1)) ? '0 : cnt_q + 1'b1;
        if (cnt_q == CNT_W'(PHASE)) begin
          dout       <= din;
          dout_valid <= 1'b1;
        end
      end
    end
  end

endmodule
