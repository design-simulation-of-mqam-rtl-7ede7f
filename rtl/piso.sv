// piso: parallel-in serial-out converter between the transmit filters and
// the serial data interface of the radio chip.
//
// Every W clocks of the serial bit clock it loads the W-bit word on din and
// then shifts it out MSB first, one bit per clock. frame is high with the
// first (most significant) bit of each word so the far end can find word
// boundaries. In the transceiver the word is {I sample, Q sample}, 20 bits,
// and the bit clock runs at 20 times the sample clock. The block is only
// named in the description; word layout, bit order and the frame marker are
// this design's own choices.
//
// Ports: clk (serial bit clock), rst, din (W bits, sampled at the load
// clock); ser_out, frame (registered), load (high in the clock where din is
// sampled).
module piso #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic         ser_out,
  output logic         frame,
  output logic         load
);

  logic [W-1:0]           shreg_q;
  logic [$clog2(W)-1:0]   cnt_q;

  assign load    = (cnt_q == '0);
  assign ser_out = shreg_q[W-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg_q <= '0;
      cnt_q   <= '0;
      frame   <= 1'b0;
    end else begin
      cnt_q <= (cnt_q == $clog2(W)'(W-1)) ? '0 : cnt_q + 1'b1;
      frame <= load;
      if (load) shreg_q <= din;
      else      shreg_q <= {shreg_q[W-2:0], 1'b0};
    end
  end

endmodule
