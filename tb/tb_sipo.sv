// tb_sipo: self-checking test of sipo with a 20-bit word.
//
// Random words are sent MSB first with frame on the first bit, with random
// idle gaps (bits outside a frame, which must be ignored) between words.
// Each word must appear on dout with a one-clock dout_valid pulse from the clock
// edge that takes its last bit, and dout must hold between words.
module tb_sipo;
  localparam int W = 20;
  logic clk = 0, rst = 1, ser_in = 0, frame_in = 0;
  logic [W-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0, words = 0;

  sipo #(.W(W)) dut (.*);

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
    logic [W-1:0] word, prev;
    repeat (3) @(negedge clk);
    rst = 0;
    prev = '0;
    for (int n = 0; n < 200; n++) begin
      word = W'($urandom);
      for (int b = W-1; b >= 0; b--) begin
        ser_in = word[b];
        frame_in = (b == W-1);
        @(negedge clk);
        if (b != 0) begin
          check(dout_valid == 0, "no valid inside a word");
          check(dout == prev, "dout holds");
        end
      end
      // the clock edge that takes the last bit also presents the word
      check(dout_valid == 1, "valid with last bit");
      check(dout == word, "word value");
      frame_in = 0;
      prev = word;
      words++;
      repeat ($urandom_range(0, 5)) begin
        ser_in = 1'($urandom);
        @(negedge clk);
        check(dout_valid == 0 && dout == prev, "idle bits ignored");
      end
    end
    check(words == 200, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
