// digital_receiver: the receive half of the transceiver: matched FIR filter
// and down-sampler per quadrature channel, chip decisions and the chip
// decoder, plus the timing acquisition they need.
//
// Acquisition: while rx_start is high and the receiver is not yet locked,
// the first non-zero I or Q input sample is taken as the first sample of the
// first chip. That cycle restarts both down-samplers and the chip decoder
// and sets rx_locked; lock is held until rx_start falls. This assumes a
// quiet (all-zero) input before the burst, as on the transmitter output; the
// description names rx_start but not how the receiver finds chip timing, so
// the scheme is this design's own.
//
// Datapath: each channel goes through the half-sine matched filter
// (10-bit in, 23-bit out), is decimated by 8 at the filter's peak, and the
// sign of the peak is the chip (positive = 1). Chip pairs go to the chip
// decoder, which gives one 4-bit symbol per 8 chips.
//
// Timing: the symbol appears on rx_sym_out with rx_sym_valid 34 clocks after
// the first sample of the symbol reached rx_i_in/rx_q_in.
//
// Ports: clk_8_mhz, rst, rx_start, rx_i_in, rx_q_in (10-bit signed);
// rx_sym_out, rx_sym_valid, rx_distance, rx_locked.
module digital_receiver
  import zigbee_pkg::*;
(
  input  logic       clk_8_mhz,
  input  logic       rst,
  input  logic       rx_start,
  input  sample_t    rx_i_in,
  input  sample_t    rx_q_in,
  output symbol_t    rx_sym_out,
  output logic       rx_sym_valid,
  output logic [3:0] rx_distance,
  output logic       rx_locked
);

  localparam int unsigned MF_W = SAMPLE_W + COEF_W + $clog2(N_TAPS);

  logic                   sync;
  logic signed [MF_W-1:0] mf_i, mf_q, ds_i, ds_q;
  logic                   ds_i_valid, ds_q_valid;
  chip_pair_t             pair;

  assign sync = rx_start && !rx_locked && ((rx_i_in != '0) || (rx_q_in != '0));

  always_ff @(posedge clk_8_mhz) begin
    if (rst || !rx_start) rx_locked <= 1'b0;
    else if (sync)        rx_locked <= 1'b1;
  end

  fir_filter #(.IN_W(SAMPLE_W), .OUT_W(MF_W)) u_mf_i (
    .clk(clk_8_mhz), .rst, .en(1'b1), .din(rx_i_in), .dout(mf_i)
  );

  fir_filter #(.IN_W(SAMPLE_W), .OUT_W(MF_W)) u_mf_q (
    .clk(clk_8_mhz), .rst, .en(1'b1), .din(rx_q_in), .dout(mf_q)
  );

  down_sampler #(.M(UPSAMPLE), .W(MF_W)) u_ds_i (
    .clk(clk_8_mhz), .rst, .sync, .stop(!rx_start), .din(mf_i),
    .dout(ds_i), .dout_valid(ds_i_valid)
  );

  down_sampler #(.M(UPSAMPLE), .W(MF_W)) u_ds_q (
    .clk(clk_8_mhz), .rst, .sync, .stop(!rx_start), .din(mf_q),
    .dout(ds_q), .dout_valid(ds_q_valid)
  );

  assign pair.i = (ds_i > 0);
  assign pair.q = (ds_q > 0);

  chip_decoder u_dec (
    .clk(clk_8_mhz), .rst, .sync, .pair_valid(ds_i_valid), .pair,
    .sym_out(rx_sym_out), .sym_valid(rx_sym_valid), .distance(rx_distance)
  );

  // Both channels are decimated in lock-step.
  a_iq_lockstep: assert property (@(posedge clk_8_mhz) disable iff (rst)
    ds_i_valid == ds_q_valid);

endmodule
