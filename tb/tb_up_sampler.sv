// tb_up_sampler: self-checking test of up_sampler with L = 8.
//
// Random chips are fed every 8 clocks, with idle gaps of several chip
// periods in between. Each chip must come out as one +1 (chip 1) or -1
// (chip 0) sample one clock later, followed by zeros; phase must count the
// clocks since the last impulse and saturate at 7.
module tb_up_sampler;
  logic clk = 0, rst = 1, in_valid = 0, in_chip = 0;
  logic signed [1:0] sample;
  logic [2:0] phase;
  int checks = 0, failures = 0;
  int impulses = 0;

  up_sampler #(.L(8)) dut (.*);

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

  initial begin
    bit c;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(sample == 0 && phase == 7, "reset state");
    for (int n = 0; n < 200; n++) begin
      c = 1'($urandom);
      in_valid = 1; in_chip = c;
      @(negedge clk);
      in_valid = 0; in_chip = ~c;
      check(sample == (c ? 2'sd1 : -2'sd1), "impulse value");
      check(phase == 0, "phase restarts");
      impulses++;
      for (int k = 1; k < 8; k++) begin
        @(negedge clk);
        check(sample == 0, "stuffed zero");
        check(phase == 3'(k), "phase count");
      end
      if (n % 10 == 9) begin
        repeat (17) begin
          @(negedge clk);
          check(sample == 0 && phase == 7, "idle gap");
        end
      end
    end
    check(impulses == 200, "impulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
