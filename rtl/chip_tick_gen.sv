// chip_tick_gen: turns the 1 MHz chip clock into a one-cycle chip tick in
// the 8 MHz sample-clock domain.
//
// The 1 MHz clock is passed through a two-flop synchronizer and its rising
// edge is detected, so every rising edge of clk_1_mhz yields exactly one
// tick, two to three clk_8_mhz cycles later. With the two clocks derived
// from one source the tick is exactly UPSAMPLE = 8 cycles apart. Using the
// slow clock as a strobe rather than as a second clock domain is this
// design's own choice; the description only states that a 1 MHz and an
// 8 MHz clock are applied.
//
// Ports: clk (8 MHz), rst (synchronous, active high), clk_slow (1 MHz),
// tick (one clk cycle per clk_slow rising edge).
module chip_tick_gen (
  input  logic clk,
  input  logic rst,
  input  logic clk_slow,
  output logic tick
);

  logic [2:0] sync_q;   // [0],[1]: synchronizer, [2]: previous value

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q <= '0;
      tick   <= 1'b0;
    end else begin
      sync_q <= {sync_q[1:0], clk_slow};
      tick   <= sync_q[1] & ~sync_q[2];
    end
  end

endmodule
