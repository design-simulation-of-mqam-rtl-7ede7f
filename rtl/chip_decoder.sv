// chip_decoder: despreads received chips back into 4-bit symbols.
//
// Chip pairs (I = even chip, Q = odd chip) are gathered until all 8 chips of
// a symbol are in. The 8-chip word is then compared with the 16 codes of
// zigbee_pkg::chip_code and the symbol whose code has the smallest Hamming
// distance wins (lowest symbol on a tie), so a single wrong chip is still
// decoded when it does not sit halfway between two codes. The decoder is
// named, not detailed, in the description; minimum-distance decoding is this
// design's choice.
//
// Ports: sync (restarts symbol framing), pair_valid/pair; sym_out,
// sym_valid, distance (Hamming distance of the winner; 0 = exact), all
// registered, one clock after the fourth pair of a symbol.
module chip_decoder
  import zigbee_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sync,
  input  logic       pair_valid,
  input  chip_pair_t pair,
  output symbol_t    sym_out,
  output logic       sym_valid,
  output logic [3:0] distance
);

  localparam int unsigned IDX_W = $clog2(PAIRS_PER_SYMBOL);

  chips_t           chips_q;
  logic [IDX_W-1:0] idx_q;
  chips_t           word;
  symbol_t          best_sym;
  logic [3:0]       best_dist;

  // Word with the incoming pair put in place.
  always_comb begin
    word = chips_q;
    word[2*idx_q]   = pair.i;
    word[2*idx_q+1] = pair.q;
  end

  // Minimum-distance search over the codebook.
  always_comb begin
    logic [3:0] d;
    best_sym  = '0;
    best_dist = 4'd15;
    for (int s = 0; s < 16; s++) begin
      d = 4'($countones(word ^ chip_code(symbol_t'(s))));
      if (d < best_dist) begin
        best_dist = d;
        best_sym  = symbol_t'(s);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      chips_q   <= '0;
      idx_q     <= '0;
      sym_out   <= '0;
      sym_valid <= 1'b0;
      distance  <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (sync) begin
        idx_q <= '0;
      end else if (pair_valid) begin
        chips_q <= word;
        if (idx_q == IDX_W'(PAIRS_PER_SYMBOL-1)) begin
          idx_q     <= '0;
          sym_out   <= best_sym;
          distance  <= best_dist;
          sym_valid <= 1'b1;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end
    end
  end

endmodule
