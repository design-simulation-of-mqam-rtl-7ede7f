// tb_symbol_sequence: the transceiver in its basic operating sequence, with
// all parameters at their defaults and the I/Q outputs looped back to the
// I/Q inputs.
//
// Reset is applied and released, rx_start and tx_start are raised, and the
// symbols 0000, 0001 and 0101 are transmitted, each for several symbol
// periods, while 1 MHz and 8 MHz clocks run. The received symbol stream must
// repeat the transmitted one, symbol for symbol and in order, 36 clocks after
// each symbol is taken, with no chip errors; the I/Q outputs must be active
// (non-zero) while sending.
//
// One time unit stands for 3.125 ns: clk_ser has a period of 2 units,
// clk_8_mhz of 40 and clk_1_mhz of 320.
module tb_symbol_sequence;
  import zigbee_pkg::*;

  localparam int REPEAT = 6;            // symbol periods per symbol value
  localparam logic [3:0] SEQ [3] = '{4'b0000, 4'b0001, 4'b0101};

  logic clk_1_mhz = 0, clk_8_mhz = 0, clk_ser = 0, rst = 1;
  symbol_t tx_symbol = '0;
  logic tx_start = 0, rx_start = 0;
  sample_t tx_i_out, tx_q_out;
  logic tx_symbol_load, tx_busy, tx_ser_data, tx_ser_frame;
  symbol_t rx_sym_out;
  logic rx_sym_valid, rx_locked;
  logic [3:0] rx_distance;

  zigbee_transceiver dut (
    .clk_1_mhz, .clk_8_mhz, .clk_ser, .rst,
    .tx_symbol, .tx_start, .tx_i_out, .tx_q_out, .tx_symbol_load, .tx_busy,
    .tx_ser_data, .tx_ser_frame,
    .rx_start, .rx_serial_sel(1'b0), .rx_i_in(tx_i_out), .rx_q_in(tx_q_out),
    .rx_ser_data(tx_ser_data), .rx_ser_frame(tx_ser_frame),
    .rx_sym_out, .rx_sym_valid, .rx_distance, .rx_locked
  );

  always #160 clk_1_mhz = ~clk_1_mhz;
  always #20  clk_8_mhz = ~clk_8_mhz;
  always #1   clk_ser   = ~clk_ser;

  int checks = 0, failures = 0, cyc = 0, received = 0, active = 0;
  int exp_q [$], t_q [$];

  always @(posedge clk_8_mhz) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk_8_mhz) begin
    if (tx_busy && tx_i_out != 0 && tx_q_out != 0) active++;
    if (rx_sym_valid) begin
      check(exp_q.size() > 0, "symbol expected");
      if (exp_q.size() > 0) begin
        check(int'(rx_sym_out) == exp_q.pop_front(), "received symbol");
        check(cyc - t_q.pop_front() == 36, "latency 36 clocks");
        check(rx_distance == 0, "no chip errors");
        received++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk_8_mhz);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10) @(negedge clk_8_mhz);
    rst = 0;
    rx_start = 1;
    tx_symbol = SEQ[0];
    tx_start = 1;
    for (int v = 0; v < 3; v++)
      for (int r = 0; r < REPEAT; r++) begin
        @(negedge clk_8_mhz);
        while (!tx_symbol_load) @(negedge clk_8_mhz);
        exp_q.push_back(int'(SEQ[v]));
        t_q.push_back(cyc);
        if (r == REPEAT - 1 && v < 2) tx_symbol = SEQ[v+1];
      end
    tx_start = 0;
    repeat (64) @(negedge clk_8_mhz);
    check(rx_locked, "receiver locked");
    check(received == 3 * REPEAT, "all symbols received");
    check(active > 3 * REPEAT * 20, "I/Q outputs active while sending");
    $display("received %0d symbols", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
