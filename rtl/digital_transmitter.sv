// digital_transmitter: the transmit half of the transceiver: chip generator,
// one up-sampler and one pulse-shaping FIR filter per quadrature channel.
//
// The 1 MHz clock sets the chip-pair rate (via chip_tick_gen); all logic runs
// on the 8 MHz sample clock. Each 4-bit symbol becomes 8 chips; even chips
// drive the I channel and odd chips the Q channel, each chip is up-sampled
// by 8 to a bipolar impulse and shaped by the half-sine FIR into one
// 8-sample pulse of peak 501 in a 10-bit signed sample. This chain is the
// one of the description; the I and Q pulses are sent aligned (no half-chip
// offset), a choice of this design since the description names none.
//
// Timing: a symbol takes 4 us (4 chip pairs); the first sample of a chip
// reaches tx_i_out/tx_q_out 2 clk_8_mhz cycles after the chip generator
// emits the pair (up-sampler and FIR registers).
//
// Ports: clk_8_mhz, clk_1_mhz, rst (synchronous, active high), tx_start,
// tx_symbol; tx_i_out, tx_q_out (10-bit signed), symbol_load (pulse per
// symbol taken from tx_symbol), busy.
module digital_transmitter
  import zigbee_pkg::*;
(
  input  logic    clk_8_mhz,
  input  logic    clk_1_mhz,
  input  logic    rst,
  input  logic    tx_start,
  input  symbol_t tx_symbol,
  output sample_t tx_i_out,
  output sample_t tx_q_out,
  output logic    symbol_load,
  output logic    busy
);

  logic              chip_tick;
  chip_pair_t        pair;
  logic              pair_valid;
  logic signed [1:0] up_i, up_q;
  logic [$clog2(UPSAMPLE)-1:0] phase_i, phase_q;

  chip_tick_gen u_tick (
    .clk(clk_8_mhz), .rst, .clk_slow(clk_1_mhz), .tick(chip_tick)
  );

  chip_generator u_chip_gen (
    .clk(clk_8_mhz), .rst, .chip_tick, .tx_start, .tx_symbol,
    .pair, .pair_valid, .symbol_load, .busy
  );

  up_sampler #(.L(UPSAMPLE)) u_up_i (
    .clk(clk_8_mhz), .rst, .in_valid(pair_valid), .in_chip(pair.i),
    .sample(up_i), .phase(phase_i)
  );

  up_sampler #(.L(UPSAMPLE)) u_up_q (
    .clk(clk_8_mhz), .rst, .in_valid(pair_valid), .in_chip(pair.q),
    .sample(up_q), .phase(phase_q)
  );

  fir_filter #(.IN_W(2), .OUT_W(SAMPLE_W)) u_fir_i (
    .clk(clk_8_mhz), .rst, .en(1'b1), .din(up_i), .dout(tx_i_out)
  );

  fir_filter #(.IN_W(2), .OUT_W(SAMPLE_W)) u_fir_q (
    .clk(clk_8_mhz), .rst, .en(1'b1), .din(up_q), .dout(tx_q_out)
  );

  // Both channels are up-sampled in lock-step.
  a_iq_lockstep: assert property (@(posedge clk_8_mhz) disable iff (rst)
    phase_i == phase_q);

endmodule
