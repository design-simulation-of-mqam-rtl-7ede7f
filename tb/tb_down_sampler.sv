// tb_down_sampler: self-checking test of down_sampler (M = 8, PHASE = 7).
//
// A counting ramp is fed as input, so each kept sample tells where it came
// from. After a sync in clock t0 the kept samples must be the ones present
// in clocks t0+8, t0+16, ..., each appearing one clock later. A second sync
// mid-stream must re-phase the decimation, and stop must end it.
module tb_down_sampler;
  localparam int W = 23;
  logic clk = 0, rst = 1, sync = 0, stop = 0;
  logic signed [W-1:0] din = '0, dout;
  logic dout_valid;
  int checks = 0, failures = 0, kept = 0;
  int cyc = 0;

  down_sampler #(.M(8), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The input in clock c is c; check each output against the sync time.
  task automatic run(input int t0, input int n_clocks);
    for (int i = 1; i <= n_clocks; i++) begin
      din = W'(cyc);
      @(negedge clk);
      cyc++;
      // output shows the sample of clock cyc-1
      if ((cyc - 1 - t0) % 8 == 0 && cyc - 1 > t0) begin
        check(dout_valid, "valid at phase");
        check(int'(dout) == cyc - 1, "kept sample");
        kept++;
      end else begin
        check(!dout_valid, "no valid off phase");
      end
    end
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst = 0;
    // before any sync nothing comes out
    for (int i = 0; i < 20; i++) begin
      din = W'(cyc); @(negedge clk); cyc++;
      check(!dout_valid, "idle before sync");
    end
    for (int r = 0; r < 5; r++) begin
      t0 = cyc;
      din = W'(cyc); sync = 1;
      @(negedge clk); cyc++; sync = 0;
      check(!dout_valid, "no valid at sync");
      run(t0, 8 * 12 + $urandom_range(0, 7));
    end
    stop = 1;
    din = W'(cyc); @(negedge clk); cyc++; stop = 0;
    for (int i = 0; i < 30; i++) begin
      din = W'(cyc); @(negedge clk); cyc++;
      check(!dout_valid, "stopped");
    end
    check(kept >= 55, "samples kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
