// tb_digital_transmitter: self-checking test of the transmit chain.
//
// clk_8_mhz and clk_1_mhz are generated from one time base (8 : 1). The
// testbench sends the 16 symbols and then random ones, and builds the
// expected I/Q sample streams itself: for each symbol the hand-written
// codebook gives 8 chips, even chips on I, odd on Q, and each chip becomes
// the 8 samples +-round(511*sin(pi*(k+0.5)/8)). Checked: every output sample,
// the 2-clock delay from symbol_load to the first sample of the symbol, 32
// clocks per symbol, silence while tx_start is low, and completion of a
// symbol when tx_start falls in the middle of it.
// One time unit stands for 3.125 ns: clk_8_mhz has a period of 40 units and
// clk_1_mhz of 320.
module tb_digital_transmitter;
  import zigbee_pkg::*;

  localparam logic [7:0] CODES [16] = '{
    8'h1d, 8'h3a, 8'h74, 8'he8, 8'hd1, 8'ha3, 8'h47, 8'h8e,
    8'he2, 8'hc5, 8'h8b, 8'h17, 8'h2e, 8'h5c, 8'hb8, 8'h71
  };
  localparam int H [8] = '{100, 284, 425, 501, 501, 425, 284, 100};

  logic clk_8_mhz = 0, clk_1_mhz = 0, rst = 1, tx_start = 0;
  symbol_t tx_symbol = '0;
  sample_t tx_i_out, tx_q_out;
  logic symbol_load, busy;
  int checks = 0, failures = 0, symbols = 0; 

  digital_transmitter dut (.*);

  always #20 clk_8_mhz = ~clk_8_mhz;
  always #160 clk_1_mhz = ~clk_1_mhz;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk_8_mhz);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected samples, keyed by clock number; clocks with no entry expect 0.
  int exp_i [int], exp_q [int];
  int cyc = 0;

  always @(negedge clk_8_mhz) begin
    if (!rst) begin
      if (exp_i.exists(cyc)) begin
        check(int'(tx_i_out) == exp_i[cyc], "I sample");
        check(int'(tx_q_out) == exp_q[cyc], "Q sample");
        exp_i.delete(cyc);
        exp_q.delete(cyc);
      end else begin
        check(tx_i_out == 0 && tx_q_out == 0, "zero outside symbols");
      end
    end
  end

  always @(posedge clk_8_mhz) cyc++;

  // Schedule the 32 samples of symbol s, the first 2 clocks after now.
  task automatic expect_symbol(input logic [3:0] s);
    logic [7:0] c;
    c = CODES[s];
    for (int p = 0; p < 4; p++)
      for (int k = 0; k < 8; k++) begin
        exp_i[cyc + 2 + 8*p + k] = c[2*p]   ? H[k] : -H[k];
        exp_q[cyc + 2 + 8*p + k] = c[2*p+1] ? H[k] : -H[k];
      end
    symbols++;
  endtask

  initial begin
    logic [3:0] s;
    int t_prev;
    repeat (5) @(negedge clk_8_mhz);
    rst = 0;
    repeat (100) begin
      @(negedge clk_8_mhz);
      check(!symbol_load, "no symbol while idle");
    end
    s = 0;
    tx_symbol = s;
    tx_start = 1;
    t_prev = -1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk_8_mhz);
      while (!symbol_load) @(negedge clk_8_mhz);
      if (t_prev >= 0) check(cyc - t_prev == 32, "32 clocks per symbol");
      t_prev = cyc;
      expect_symbol(s);
      s = (n < 15) ? 4'(n + 1) : 4'($urandom_range(0, 15));
      tx_symbol = s;
      if (n == 59) begin
        tx_start = 0;                  // falls mid-symbol
        @(negedge clk_8_mhz);
        check(busy, "busy after tx_start fell");
      end
    end
    repeat (300) begin
      @(negedge clk_8_mhz);
      check(!symbol_load, "no new symbol after stop");
    end
    check(exp_i.num() == 0, "all samples seen, last symbol completed");
    check(symbols == 60, "symbol count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
