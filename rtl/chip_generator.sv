// chip_generator: spreads 4-bit symbols into 8-chip PN sequences and hands
// the chips out two at a time, the even chip to the I channel and the odd
// chip to the Q channel, as the design description prescribes.
//
// On a chip tick at the start of a symbol the generator samples tx_symbol if
// tx_start is high and looks up its code (zigbee_pkg::chip_code); otherwise
// it stays idle and emits nothing. Each following tick emits the next chip
// pair, so a symbol takes PAIRS_PER_SYMBOL = 4 ticks. A symbol that has
// begun is always completed, even if tx_start falls. The codebook values and
// the pair-per-tick timing are this design's choices.
//
// Ports: chip_tick (one cycle per chip pair), tx_start, tx_symbol (4 bits);
// pair/pair_valid (registered, valid in the cycle after the tick),
// symbol_load (pulses with the first pair of each symbol), busy.
module chip_generator
  import zigbee_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       chip_tick,
  input  logic       tx_start,
  input  symbol_t    tx_symbol,
  output chip_pair_t pair,
  output logic       pair_valid,
  output logic       symbol_load,
  output logic       busy
);

  localparam int unsigned IDX_W = $clog2(PAIRS_PER_SYMBOL);

  chips_t           code_q;
  logic [IDX_W-1:0] idx_q;
  chips_t           cur_code;
  logic             start_sym;

  assign start_sym = chip_tick && (idx_q == '0) && tx_start;
  assign cur_code  = start_sym ? chip_code(tx_symbol) : code_q;
  assign busy      = (idx_q != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      code_q      <= '0;
      idx_q       <= '0;
      pair        <= '0;
      pair_valid  <= 1'b0;
      symbol_load <= 1'b0;
    end else begin
      pair_valid  <= 1'b0;
      symbol_load <= 1'b0;
      if (chip_tick && (start_sym || busy)) begin
        code_q      <= cur_code;
        pair.i      <= cur_code[2*idx_q];
        pair.q      <= cur_code[2*idx_q+1];
        pair_valid  <= 1'b1;
        symbol_load <= start_sym;
        idx_q       <= (idx_q == IDX_W'(PAIRS_PER_SYMBOL-1)) ? '0 : idx_q + 1'b1;
      end
    end
  end

endmodule
