// sipo: serial-in parallel-out converter between the serial data interface
// of the radio chip and the receive filters; the inverse of piso.
//
// A high frame input marks the first (most significant) bit of a word. From
// there W bits are shifted in, one per serial clock, and the completed word
// is presented on dout with a one-clock dout_valid pulse; dout holds until
// the next word. Bits outside a frame are ignored. Word layout and the frame
// marker are this design's own choices, matching piso.
//
// Ports: clk (serial bit clock), rst, ser_in, frame_in; dout (W bits),
// dout_valid, both registered on the clock edge that takes the last bit.
module sipo #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ser_in,
  input  logic         frame_in,
  output logic [W-1:0] dout,
  output logic         dout_valid
);

  logic [W-1:0]         shreg_q;
  logic [$clog2(W)-1:0] cnt_q;     // bits received in this word, 0 = idle
  logic [W-1:0]         next_word;

  assign next_word = {shreg_q[W-2:0], ser_in};

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg_q    <= '0;
      cnt_q      <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (frame_in) begin
        shreg_q <= W'(ser_in);
        cnt_q   <= 1;
      end else if (cnt_q != '0) begin
        shreg_q <= next_word;
        if (cnt_q == $clog2(W)'(W-1)) begin
          dout       <= next_word;
          dout_valid <= 1'b1;
          cnt_q      <= '0;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
