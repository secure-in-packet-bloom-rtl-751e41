// tb_bit_counter -- self-checking test of the Bloom-filter ones counter.
// Feeds random four-word filters (with clear on the first word), compares the
// count one clock after the last word with a $countones reference, and checks
// the too_many flag exactly at the limit (128 ones) and one above it.
module tb_bit_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, word_valid = 1'b0;
  logic [63:0] word = '0;
  logic [8:0] count;
  logic too_many;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  bit_counter dut (.clk, .rst_n, .clear, .word_valid, .word, .count, .too_many);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic feed(input logic [255:0] bf);
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      clear = (w == 0); word_valid = 1'b1; word = bf[255-64*w -: 64];
    end
    @(negedge clk);
    clear = 1'b0; word_valid = 1'b0; word = '0;
    // the count of the last word is visible one clock after it was presented
    check(int'(count) == $countones(bf), $sformatf("count %0d expected %0d", count, $countones(bf)));
    check(too_many == ($countones(bf) > 128), "too_many flag");
  endtask

  initial begin
    logic [255:0] bf;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    feed('0);
    feed('1);
    feed({128'h0, {128{1'b1}}});             // exactly the limit
    feed({127'h0, {129{1'b1}}});             // one above
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 8; i++) bf[32*i +: 32] = $urandom;
      if (t % 2 == 1) bf &= {8{$urandom}};   // sparser filters too
      feed(bf);
    end
    // a cleared count followed by an idle cycle holds its value
    @(negedge clk);
    check(int'(count) == $countones(bf), "count holds without word_valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
