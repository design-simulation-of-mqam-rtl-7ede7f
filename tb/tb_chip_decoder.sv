// tb_chip_decoder: self-checking test of chip_decoder.
//
// Random symbols are spread with a hand-written codebook table, optionally
// with one chip flipped, and fed as four chip pairs with random gaps. Each
// symbol must come out one clock after its fourth pair with distance 0
// (clean) or 1 (one flipped chip). With a flipped chip the expected symbol
// is found by the testbench's own nearest-code search over the table (lowest
// symbol on a tie). A sync mid-symbol must restart the framing.
module tb_chip_decoder;
  import zigbee_pkg::*;

  localparam logic [7:0] CODES [16] = '{
    8'h1d, 8'h3a, 8'h74, 8'he8, 8'hd1, 8'ha3, 8'h47, 8'h8e,
    8'he2, 8'hc5, 8'h8b, 8'h17, 8'h2e, 8'h5c, 8'hb8, 8'h71
  };

  logic clk = 0, rst = 1, sync = 0, pair_valid = 0;
  chip_pair_t pair = '0;
  symbol_t sym_out;
  logic sym_valid;
  logic [3:0] distance;
  int checks = 0, failures = 0, decoded = 0, corrected = 0;

  chip_decoder dut (.*);

  always #5 clk = ~clk;

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

  task automatic send(input logic [7:0] w);
    for (int k = 0; k < 4; k++) begin
      pair_valid = 1; pair.i = w[2*k]; pair.q = w[2*k+1];
      @(negedge clk);
      pair_valid = 0;
      pair = chip_pair_t'($urandom);
      if (k < 3) begin
        check(!sym_valid, "no symbol before fourth pair");
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
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
    logic [7:0] w;
    int s, exp_s, exp_d;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      s = (n < 16) ? n : $urandom_range(0, 15);
      w = CODES[s];
      if (n >= 100) begin int fi; fi = $urandom_range(0, 7); w[fi] = ~w[fi]; end
      exp_s = nearest(w, exp_d);
      send(w);
      check(sym_valid, "symbol valid");
      check(int'(sym_out) == exp_s, "symbol value");
      check(int'(distance) == exp_d, "distance");
      if (n < 100) check(exp_s == s, "clean symbol is itself");
      if (exp_d == 1 && exp_s == s) corrected++;
      decoded++;
      @(negedge clk);
      check(!sym_valid, "valid is one clock");
      // half way: two stray pairs, then sync restarts framing
      if (n == 150) begin
        pair_valid = 1; @(negedge clk); @(negedge clk); pair_valid = 0;
        sync = 1; @(negedge clk); sync = 0;
      end
    end
    check(corrected > 20, "single chip errors corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
