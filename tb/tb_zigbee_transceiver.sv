// tb_zigbee_transceiver: end-to-end test of the transceiver with all
// parameters at their defaults.
//
// The transmitter output is looped back to the receiver twice over: the
// parallel samples tx_i_out/tx_q_out drive rx_i_in/rx_q_in, and the serial
// link tx_ser_data/tx_ser_frame drives rx_ser_data/rx_ser_frame. Clocks come
// from one time base: clk_1_mhz, clk_8_mhz and a 160 MHz clk_ser.
//
// Two bursts are sent, the first received over the parallel path
// (rx_serial_sel = 0), the second over the serial path (rx_serial_sel = 1).
// Each carries all 16 symbols and then random ones, and ends with tx_start
// falling in the middle of a symbol. In a few symbols of each burst the
// testbench inverts one I chip on its way to the receiver (on the parallel
// path by negating rx_i_in, on the serial path by flipping the serial bits of
// the I sample); the expected symbol is then the testbench's own nearest-code
// choice for the damaged chip word.
//
// Checked: every decoded symbol in order and its Hamming distance, the
// 36-clock symbol_load-to-rx_sym_valid latency of the parallel path, a
// constant latency on the serial path, the symbol count of each burst,
// silence between bursts. Each mechanism (parallel path, serial path, path
// switch, acquisition, chip-error correction, symbol completion after
// tx_start falls) is counted and must have happened.
// One time unit stands for 3.125 ns: clk_ser has a period of 2 units,
// clk_8_mhz of 40 and clk_1_mhz of 320.
module tb_zigbee_transceiver;
  import zigbee_pkg::*;

  localparam logic [7:0] CODES [16] = '{
    8'h1d, 8'h3a, 8'h74, 8'he8, 8'hd1, 8'ha3, 8'h47, 8'h8e,
    8'he2, 8'hc5, 8'h8b, 8'h17, 8'h2e, 8'h5c, 8'hb8, 8'h71
  };
  localparam int N_SYM = 24;

  logic clk_1_mhz = 0, clk_8_mhz = 0, clk_ser = 0, rst = 1;
  symbol_t tx_symbol = '0;
  logic tx_start = 0, rx_start = 0, rx_serial_sel = 0;
  sample_t tx_i_out, tx_q_out, rx_i_in, rx_q_in;
  logic tx_symbol_load, tx_busy, tx_ser_data, tx_ser_frame;
  logic rx_ser_data, rx_ser_frame;
  symbol_t rx_sym_out;
  logic rx_sym_valid, rx_locked;
  logic [3:0] rx_distance;

  logic inv_i = 0;          // invert the I chip on its way to the receiver
  int   ser_bit = 0;        // serial bit position within a 20-bit word

  zigbee_transceiver dut (.*);

  always #160 clk_1_mhz = ~clk_1_mhz;
  always #20  clk_8_mhz = ~clk_8_mhz;
  always #1   clk_ser   = ~clk_ser;

  // Loopback. The I sample is the first 10 bits of each serial word.
  always @(posedge clk_ser) ser_bit <= tx_ser_frame ? 1 : ser_bit + 1;
  assign rx_i_in      = inv_i ? -tx_i_out : tx_i_out;
  assign rx_q_in      = tx_q_out;
  assign rx_ser_frame = tx_ser_frame;
  assign rx_ser_data  = tx_ser_data ^ (inv_i && (tx_ser_frame || ser_bit < 10));

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_parallel = 0, n_serial = 0, n_switch = 0, n_locks = 0,
      n_corrected = 0, n_completed = 0;
  int exp_q [$], exp_d [$], load_cyc [$];
  int ser_latency = -1;

  always @(posedge clk_8_mhz) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int nearest(logic [7:0] w, output int dd);
    int best = 0;
    dd = 99;
    for (int s = 0; s < 16; s++)
      if ($countones(w ^ CODES[s]) < dd) begin
        dd = $countones(w ^ CODES[s]);
        best = s;
      end
    return best;
  endfunction

  // Receive side checker.
  always @(negedge clk_8_mhz) begin
    if (rx_sym_valid) begin
      check(exp_q.size() > 0, "symbol expected");
      if (exp_q.size() > 0) begin
        int e, d, t, lat;
        e = exp_q.pop_front();
        d = exp_d.pop_front();
        t = load_cyc.pop_front();
        lat = cyc - t;
        check(int'(rx_sym_out) == e, "symbol value");
        check(int'(rx_distance) == d, "distance");
        if (d == 1) n_corrected++;
        if (rx_serial_sel) begin
          if (ser_latency < 0) ser_latency = lat;
          check(lat == ser_latency, "constant serial latency");
          n_serial++;
        end else begin
          check(lat == 36, "parallel latency 36 clocks");
          n_parallel++;
        end
      end
    end
  end

  logic locked_q = 0;
  always @(posedge clk_8_mhz) begin
    if (rx_locked && !locked_q) n_locks++;
    locked_q <= rx_locked;
  end

  initial begin
    repeat (200000) @(posedge clk_8_mhz);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Invert the I chip of pair p of the symbol loaded in this clock.
  task automatic corrupt(input int p);
    repeat (2 + 8*p) @(negedge clk_8_mhz);
    inv_i = 1;
    repeat (8) @(negedge clk_8_mhz);
    inv_i = 0;
  endtask

  task automatic run_burst(input bit serial);
    logic [3:0] s;
    logic [7:0] w;
    int e, d, n_before;
    n_before = serial ? n_serial : n_parallel;
    rx_serial_sel = serial;
    rx_start = 1;
    repeat (50) begin
      @(negedge clk_8_mhz);
      check(!rx_sym_valid && !rx_locked, "quiet before burst");
    end
    s = 0;
    tx_symbol = s;
    tx_start = 1;
    for (int n = 0; n < N_SYM; n++) begin
      @(negedge clk_8_mhz);
      while (!tx_symbol_load) @(negedge clk_8_mhz);
      w = CODES[s];
      if (n % 7 == 5) begin
        w[2] = ~w[2];           // I chip of pair 1
        fork corrupt(1); join_none
      end
      e = nearest(w, d);
      exp_q.push_back(e);
      exp_d.push_back(d);
      load_cyc.push_back(cyc);
      s = (n < 15) ? 4'(n + 1) : 4'($urandom_range(0, 15));
      tx_symbol = s;
      if (n == N_SYM - 1) begin
        tx_start = 0;           // falls in the middle of the last symbol
        @(negedge clk_8_mhz);
        if (tx_busy) n_completed++;
      end
    end
    repeat (60) @(negedge clk_8_mhz);
    check(exp_q.size() == 0, "burst fully decoded");
    check((serial ? n_serial : n_parallel) - n_before == N_SYM, "burst symbol count");
    rx_start = 0;
    repeat (40) begin
      @(negedge clk_8_mhz);
      check(tx_i_out == 0 && tx_q_out == 0 && !rx_locked, "silent between bursts");
    end
  endtask

  initial begin
    repeat (10) @(negedge clk_8_mhz);
    rst = 0;
    run_burst(0);
    n_switch++;
    run_burst(1);
    check(n_parallel == N_SYM, "parallel path used");
    check(n_serial == N_SYM, "serial path used");
    check(n_switch == 1, "path switched");
    check(n_locks == 2, "acquisition per burst");
    check(n_corrected >= 2, "chip errors corrected");
    check(n_completed == 2, "symbol completed after tx_start fell");
    $display("mechanisms: parallel=%0d serial=%0d switch=%0d locks=%0d corrected=%0d completed=%0d serial_latency=%0d",
             n_parallel, n_serial, n_switch, n_locks, n_corrected, n_completed, ser_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
