// tb_fir_filter: self-checking test of fir_filter.
//
// Two instances: the transmit configuration (2-bit input, 10-bit output) and
// the receive configuration (10-bit input, 23-bit output), both with the
// default half-sine coefficients. Random inputs are applied and each output
// is compared with a reference convolution computed in the testbench from
// its own copy of the coefficients, round(511*sin(pi*(k+0.5)/8)). A third
// instance with a narrow output checks saturation. Latency is one clock.
module tb_fir_filter;
  localparam int H [8] = '{100, 284, 425, 501, 501, 425, 284, 100};

  logic clk = 0, rst = 1;
  logic signed [1:0]  din_tx = 0;
  logic signed [9:0]  dout_tx;
  logic signed [9:0]  din_rx = 0;
  logic signed [22:0] dout_rx;
  logic signed [11:0] dout_sat;
  int hist_tx [8], hist_rx [8];
  int checks = 0, failures = 0, saturations = 0;

  fir_filter #(.IN_W(2), .OUT_W(10)) u_tx (
    .clk, .rst, .en(1'b1), .din(din_tx), .dout(dout_tx));
  fir_filter #(.IN_W(10), .OUT_W(23)) u_rx (
    .clk, .rst, .en(1'b1), .din(din_rx), .dout(dout_rx));
  fir_filter #(.IN_W(10), .OUT_W(12)) u_sat (
    .clk, .rst, .en(1'b1), .din(din_rx), .dout(dout_sat));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int conv(int h_in [8]);
    int acc = 0;
    for (int k = 0; k < 8; k++) acc += H[k] * h_in[k];
    return acc;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_tx, e_rx, e_sat;
    foreach (hist_tx[k]) begin hist_tx[k] = 0; hist_rx[k] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      // zero-stuffed +-1 impulses for tx, random full-scale samples for rx
      din_tx = (n % 8 == 0) ? (($urandom & 1) != 0 ? 2'sd1 : -2'sd1) : 2'sd0;
      if (n >= 1000 && (n % 3 == 0)) din_tx = 2'($urandom_range(0, 3));
      din_rx = 10'($urandom);
      for (int k = 7; k > 0; k--) begin
        hist_tx[k] = hist_tx[k-1];
        hist_rx[k] = hist_rx[k-1];
      end
      hist_tx[0] = int'(din_tx);
      hist_rx[0] = int'(din_rx);
      e_tx = conv(hist_tx);
      e_rx = conv(hist_rx);
      e_sat = (e_rx > 2047) ? 2047 : (e_rx < -2048) ? -2048 : e_rx;
      if (e_sat != e_rx) saturations++;
      @(negedge clk);
      if (e_tx > 511) e_tx = 511;
      if (e_tx < -512) e_tx = -512;
      check(int'(dout_tx) == e_tx, "tx fir output");
      check(int'(dout_rx) == e_rx, "rx fir output");
      check(int'(dout_sat) == e_sat, "saturated output");
    end
    check(saturations > 100, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
