// zigbee_pkg: constants, the chip codebook and the pulse-shape coefficients
// shared by the transmitter and receiver of the 2.4 GHz Zigbee-style
// baseband transceiver.
//
// Symbols are 4 bits and each symbol is spread to an 8-chip PN sequence; the
// 4-bit symbol and 8-chip length follow the design description, the actual
// chip values are this design's own choice. The codebook is built like the
// IEEE 802.15.4 one: symbols 0..7 are the eight cyclic left rotations of the
// base sequence 8'b0001_1101 and symbols 8..15 are the bitwise complements
// of those rotations. All 16 codes are distinct, with a minimum Hamming
// distance of 2. Chip j of a code (j = 0 first in time) is bit j of the code
// word; even chips go to the I channel and odd chips to the Q channel.
//
// The pulse-shaping filter is a half-sine ("sine function") pulse of one
// chip, sampled 8 times per chip:
//   HALF_SINE[k] = round(511 * sin(pi * (k + 0.5) / 8)),  k = 0..7
// giving 100, 284, 425, 501, 501, 425, 284, 100. The 511 scale makes one
// chip fill the 10-bit signed output range of the transmitter.
package zigbee_pkg;

  localparam int unsigned SYMBOL_BITS      = 4;   // bits per symbol
  localparam int unsigned CHIPS_PER_SYMBOL = 8;   // PN chips per symbol
  localparam int unsigned PAIRS_PER_SYMBOL = CHIPS_PER_SYMBOL / 2;
  localparam int unsigned UPSAMPLE         = 8;   // samples per chip (8 MHz / 1 MHz)
  localparam int unsigned SAMPLE_W         = 10;  // I/Q sample width at the ports
  localparam int unsigned N_TAPS           = 8;   // FIR length = one chip
  localparam int unsigned COEF_W           = 10;  // signed coefficient width

  typedef logic [SYMBOL_BITS-1:0]      symbol_t;
  typedef logic [CHIPS_PER_SYMBOL-1:0] chips_t;
  typedef logic signed [SAMPLE_W-1:0]  sample_t;
  typedef logic signed [COEF_W-1:0]    coef_t;

  // One chip for each of the two quadrature channels.
  typedef struct packed {
    logic i;   // even chip
    logic q;   // odd chip
  } chip_pair_t;

  localparam chips_t BASE_SEQUENCE = 8'b0001_1101;

  localparam coef_t HALF_SINE [N_TAPS] = '{
    10'sd100, 10'sd284, 10'sd425, 10'sd501,
    10'sd501, 10'sd425, 10'sd284, 10'sd100
  };

  // Cyclic left rotation of an 8-chip sequence by r positions.
  function automatic chips_t rotl(chips_t c, int unsigned r);
    chips_t res;
    for (int unsigned j = 0; j < CHIPS_PER_SYMBOL; j++)
      res[(j + r) % CHIPS_PER_SYMBOL] = c[j];
    return res;
  endfunction

  // Spreading code of a symbol.
  function automatic chips_t chip_code(symbol_t s);
    chips_t r;
    r = rotl(BASE_SEQUENCE, int'(s[2:0]));
    return s[3] ? ~r : r;
  endfunction

endpackage
