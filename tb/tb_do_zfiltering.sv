// tb_do_zfiltering -- self-checking test of the Bloom-filter match. For four
// links with random 40-bit identifiers (five 8-bit indices), builds filters
// that hold some of the links' masks plus random noise, and compares match
// with a bit-by-bit reference one clock after check. Also checks that match
// holds its value when check is low and that match_valid is a one-cycle echo.
module tb_do_zfiltering;
  import tb_zf_model::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic check_i = 1'b0;
  logic [255:0] bf = '0;
  logic [3:0][39:0] lbits = '0;
  logic [3:0] match;
  logic match_valid;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  do_zfiltering dut (.clk, .rst_n, .check(check_i), .bf, .link_bits(lbits), .match, .match_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0] want, sel;
    logic [3:0] last;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int l = 0; l < 4; l++) lbits[l] = {8'($urandom), $urandom};
      sel = 4'($urandom);
      bf = '0;
      for (int l = 0; l < 4; l++) if (sel[l]) bf |= mask_of(lbits[l]);
      if (t % 3 == 0) for (int i = 0; i < 8; i++) bf[32*i +: 32] |= $urandom & $urandom & $urandom;
      if (t % 5 == 4) bf[255 - int'(lbits[0][39:32])] = 1'b0;  // one index missing
      for (int l = 0; l < 4; l++) want[l] = ((bf & mask_of(lbits[l])) == mask_of(lbits[l]));
      check_i = 1'b1;
      @(negedge clk);
      check_i = 1'b0;
      check(match_valid, "match_valid one clock after check");
      check(match == want, $sformatf("match %b expected %b", match, want));
      last = match;
      bf = ~bf;
      @(negedge clk);
      check(!match_valid && match == last, "match held while idle");
    end
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
