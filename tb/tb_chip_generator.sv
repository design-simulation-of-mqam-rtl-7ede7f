// tb_chip_generator: self-checking test of chip_generator.
//
// A chip tick is driven every 8 clocks. Random symbols are sent back to back
// and each emitted chip pair is compared with a codebook table written out
// here by hand (base sequence 0x1D, its rotations and their complements).
// Also checked: a pair appears exactly one clock after its tick,
// symbol_load marks the first pair of each symbol, nothing is emitted while
// tx_start is low, and a symbol whose tx_start falls midway is completed.
module tb_chip_generator;
  import zigbee_pkg::*;

  localparam logic [7:0] CODES [16] = '{
    8'h1d, 8'h3a, 8'h74, 8'he8, 8'hd1, 8'ha3, 8'h47, 8'h8e,
    8'he2, 8'hc5, 8'h8b, 8'h17, 8'h2e, 8'h5c, 8'hb8, 8'h71
  };

  logic clk = 0, rst = 1, chip_tick = 0, tx_start = 0;
  symbol_t tx_symbol = '0;
  chip_pair_t pair;
  logic pair_valid, symbol_load, busy;
  int checks = 0, failures = 0;

  chip_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One tick: assert chip_tick for a clock, then look at the outputs.
  task automatic tick_and_expect(input bit exp_valid, input bit exp_load,
                                 input logic [7:0] code, input int idx);
    @(negedge clk) chip_tick = 1;
    @(negedge clk) chip_tick = 0;
    check(pair_valid == exp_valid, "pair_valid");
    check(symbol_load == exp_load, "symbol_load");
    if (exp_valid) begin
      check(pair.i == code[2*idx] && pair.q == code[2*idx+1], "chip pair value");
    end
    repeat (6) begin
      @(negedge clk);
      check(pair_valid == 0, "no pair between ticks");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] s;
    repeat (3) @(negedge clk);
    rst = 0;
    // idle: no output without tx_start
    repeat (2) tick_and_expect(0, 0, 8'h00, 0);
    check(!busy, "idle not busy");
    // all 16 symbols in order, then 40 random ones, back to back
    tx_start = 1;
    for (int n = 0; n < 56; n++) begin
      s = (n < 16) ? 4'(n) : 4'($urandom_range(0, 15));
      tx_symbol = s;
      tick_and_expect(1, 1, CODES[s], 0);
      tx_symbol = ~s;       // must be ignored mid-symbol
      for (int k = 1; k < 4; k++) tick_and_expect(1, 0, CODES[s], k);
    end
    // tx_start falls after the first pair: the symbol is still finished
    tx_symbol = 4'd9;
    tick_and_expect(1, 1, CODES[9], 0);
    tx_start = 0;
    check(busy, "busy mid-symbol");
    for (int k = 1; k < 4; k++) tick_and_expect(1, 0, CODES[9], k);
    tick_and_expect(0, 0, 8'h00, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
