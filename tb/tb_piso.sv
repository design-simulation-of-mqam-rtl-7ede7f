// tb_piso: self-checking test of piso with a 20-bit word.
//
// A new random word is placed on din every clock; the testbench remembers
// the word present in each load clock and checks that the following 20
// serial bits are that word MSB first, with frame high on exactly the first
// bit. Checks the 20-clock word period too.
module tb_piso;
  localparam int W = 20;
  logic clk = 0, rst = 1;
  logic [W-1:0] din = '0;
  logic ser_out, frame, load;
  int checks = 0, failures = 0, words = 0;

  piso #(.W(W)) dut (.*);

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
    logic [W-1:0] word;
    int last_load;
    repeat (3) @(negedge clk);
    rst = 0;
    last_load = -1;
    // find the first load clock
    while (!load) begin din = W'($urandom); @(negedge clk); end
    for (int n = 0; n < 100; n++) begin
      check(load, "load every W clocks");
      din = W'($urandom);
      word = din;
      @(negedge clk);
      din = W'($urandom);
      for (int b = W-1; b >= 0; b--) begin
        check(ser_out == word[b], "serial bit");
        check(frame == (b == W-1), "frame marker");
        if (b != 0) begin
          check(!load || b == 0, "no early load");
          @(negedge clk);
          din = W'($urandom);
        end
      end
      words++;
    end
    check(words == 100, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
