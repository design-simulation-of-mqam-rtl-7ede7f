// tb_digital_receiver: self-checking test of the receive chain.
//
// The testbench synthesizes its own baseband I/Q bursts: each symbol is
// spread with a hand-written codebook table, even chips on I and odd on Q,
// and each chip becomes 8 samples +-round(511*sin(pi*(k+0.5)/8)) plus
// uniform noise of up to +-60, limited to the 10-bit range. Bursts start after a random number of quiet
// clocks, so the receiver has to acquire chip timing each time; rx_start is
// dropped and raised again between bursts. In some symbols one chip is sent
// inverted; the expected symbol is then the testbench's own nearest-code
// choice. Checked: every decoded symbol, its distance, that it appears 34
// clocks after the first sample of the symbol, and that no extra symbols
// appear.
// One time unit stands for 3.125 ns: clk_8_mhz has a period of 40 units.
module tb_digital_receiver;
  import zigbee_pkg::*;

  localparam logic [7:0] CODES [16] = '{
    8'h1d, 8'h3a, 8'h74, 8'he8, 8'hd1, 8'ha3, 8'h47, 8'h8e,
    8'he2, 8'hc5, 8'h8b, 8'h17, 8'h2e, 8'h5c, 8'hb8, 8'h71
  };
  localparam int H [8] = '{100, 284, 425, 501, 501, 425, 284, 100};

  logic clk_8_mhz = 0, rst = 1, rx_start = 0;
  sample_t rx_i_in = '0, rx_q_in = '0;
  symbol_t rx_sym_out;
  logic rx_sym_valid, rx_locked;
  logic [3:0] rx_distance;
  int checks = 0, failures = 0, decoded = 0, corrected = 0, locks = 0;
  int cyc = 0;
  int exp_sym [int], exp_dist [int];   // keyed by the clock of rx_sym_valid

  digital_receiver dut (.*);

  always #20 clk_8_mhz = ~clk_8_mhz;
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

  always @(negedge clk_8_mhz) begin
    if (rx_sym_valid) begin
      check(exp_sym.exists(cyc), "symbol at expected clock");
      if (exp_sym.exists(cyc)) begin
        check(int'(rx_sym_out) == exp_sym[cyc], "symbol value");
        check(int'(rx_distance) == exp_dist[cyc], "distance");
        if (exp_dist[cyc] == 1 && exp_sym[cyc] >= 0) corrected++;
        exp_sym.delete(cyc);
        exp_dist.delete(cyc);
        decoded++;
      end
    end
  end

  always @(posedge clk_8_mhz) if (dut.sync) locks++;

  initial begin
    repeat (60000) @(posedge clk_8_mhz);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Noisy samples are limited to the 10-bit range, as an ADC would.
  function automatic sample_t clamp(int v);
    return sample_t'((v > 511) ? 511 : (v < -512) ? -512 : v);
  endfunction

  // One burst of n symbols; samples change at the negedge.
  task automatic burst(input int n, input int flip_every);
    logic [7:0] c, w;
    int s, dd, e, t_first;
    for (int j = 0; j < n; j++) begin
      s = $urandom_range(0, 15);
      c = CODES[s];
      w = c;
      if (flip_every > 0 && j % flip_every == flip_every - 1)
        begin int fi; fi = $urandom_range(0, 7); w[fi] = ~w[fi]; end
      e = nearest(w, dd);
      t_first = cyc;
      exp_sym[t_first + 34]  = e;
      exp_dist[t_first + 34] = dd;
      for (int p = 0; p < 4; p++)
        for (int k = 0; k < 8; k++) begin
          rx_i_in = clamp((w[2*p]   ? H[k] : -H[k]) + int'($urandom_range(0, 120)) - 60);
          rx_q_in = clamp((w[2*p+1] ? H[k] : -H[k]) + int'($urandom_range(0, 120)) - 60);
          @(negedge clk_8_mhz);
        end
    end
    rx_i_in = '0;
    rx_q_in = '0;
  endtask

  initial begin
    repeat (5) @(negedge clk_8_mhz);
    rst = 0;
    for (int b = 0; b < 8; b++) begin
      rx_start = 1;
      repeat ($urandom_range(1, 40)) begin
        @(negedge clk_8_mhz);
        check(!rx_locked, "no lock on silence");
      end
      burst(20, (b % 2 == 1) ? 3 : 0);
      repeat (20) @(negedge clk_8_mhz);
      check(rx_locked, "locked during burst");
      rx_start = 0;
      @(negedge clk_8_mhz);
      check(!rx_locked, "lock released");
    end
    check(exp_sym.num() == 0, "every symbol decoded");
    check(decoded == 160, "symbol count");
    check(locks == 8, "one acquisition per burst");
    check(corrected > 5, "single chip errors corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
