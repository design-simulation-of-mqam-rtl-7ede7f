// zigbee_transceiver: top level of the Zigbee-style baseband transceiver:
// digital transmitter, digital receiver and the serial link to the RF chip.
//
// Transmit: 4-bit symbols on tx_symbol are spread to 8 PN chips, split into
// I (even) and Q (odd) chips, up-sampled by 8 and half-sine pulse shaped;
// the 10-bit I/Q samples leave on tx_i_out/tx_q_out at 8 MHz. The same
// samples are packed into a 20-bit word {I, Q} and serialized by piso on
// tx_ser_data/tx_ser_frame, the interface towards the external 2.4 GHz RF
// transceiver chip, which is not part of this RTL.
//
// Receive: rx_serial_sel chooses the sample source: 0 takes the parallel
// rx_i_in/rx_q_in ports, 1 takes the words sipo rebuilds from
// rx_ser_data/rx_ser_frame. The receiver matched-filters, down-samples,
// decides chips and decodes them to rx_sym_out with rx_sym_valid.
//
// Clocks: clk_1_mhz sets the chip-pair rate, clk_8_mhz is the sample clock
// of all filtering; both and the port names rst, tx_symbol, tx_start,
// rx_start, rx_i_in, rx_q_in, tx_i_out, tx_q_out and rx_sym_out follow the
// description. clk_ser, the serial bit clock, is this design's addition and
// must be 20 times clk_8_mhz and phase locked to it (both from one PLL); the
// serial words cross between the two clocks as whole registers, which is
// safe only under that assumption. Reset is synchronous and active high.
module zigbee_transceiver
  import zigbee_pkg::*;
(
  input  logic       clk_1_mhz,
  input  logic       clk_8_mhz,
  input  logic       clk_ser,
  input  logic       rst,
  // transmitter
  input  symbol_t    tx_symbol,
  input  logic       tx_start,
  output sample_t    tx_i_out,
  output sample_t    tx_q_out,
  output logic       tx_symbol_load,
  output logic       tx_busy,
  output logic       tx_ser_data,
  output logic       tx_ser_frame,
  // receiver
  input  logic       rx_start,
  input  logic       rx_serial_sel,
  input  sample_t    rx_i_in,
  input  sample_t    rx_q_in,
  input  logic       rx_ser_data,
  input  logic       rx_ser_frame,
  output symbol_t    rx_sym_out,
  output logic       rx_sym_valid,
  output logic [3:0] rx_distance,
  output logic       rx_locked
);

  localparam int unsigned SER_W = 2 * SAMPLE_W;

  logic             piso_load;
  logic [SER_W-1:0] sipo_word;
  logic             sipo_valid;
  logic [SER_W-1:0] rx_word_q;   // sipo word taken into the sample clock
  sample_t          rx_i, rx_q;

  digital_transmitter u_tx (
    .clk_8_mhz, .clk_1_mhz, .rst, .tx_start, .tx_symbol,
    .tx_i_out, .tx_q_out, .symbol_load(tx_symbol_load), .busy(tx_busy)
  );

  piso #(.W(SER_W)) u_piso (
    .clk(clk_ser), .rst, .din({tx_i_out, tx_q_out}),
    .ser_out(tx_ser_data), .frame(tx_ser_frame), .load(piso_load)
  );

  sipo #(.W(SER_W)) u_sipo (
    .clk(clk_ser), .rst, .ser_in(rx_ser_data), .frame_in(rx_ser_frame),
    .dout(sipo_word), .dout_valid(sipo_valid)
  );

  always_ff @(posedge clk_8_mhz) begin
    if (rst) rx_word_q <= '0;
    else     rx_word_q <= sipo_word;
  end

  assign rx_i = rx_serial_sel ? sample_t'(rx_word_q[SER_W-1:SAMPLE_W]) : rx_i_in;
  assign rx_q = rx_serial_sel ? sample_t'(rx_word_q[SAMPLE_W-1:0])     : rx_q_in;

  digital_receiver u_rx (
    .clk_8_mhz, .rst, .rx_start, .rx_i_in(rx_i), .rx_q_in(rx_q),
    .rx_sym_out, .rx_sym_valid, .rx_distance, .rx_locked
  );

endmodule
