// tb_aes_cipher_top -- self-checking test of the AES-128 core.
// Checks the ciphertext of the FIPS-197 appendix C.1 and B vectors and of the
// all-zero key/plaintext vector, that done rises exactly 12 clocks after the
// ld cycle and is a one-cycle pulse, and that back-to-back runs work.
module tb_aes_cipher_top;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ld = 1'b0;
  logic [127:0] key = '0, text_in = '0, text_out;
  logic done, busy;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  aes_cipher_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [127:0] k, input logic [127:0] p,
                     input logic [127:0] expect_c);
    int cyc;
    @(negedge clk);
    key = k; text_in = p; ld = 1'b1;
    @(negedge clk);
    ld = 1'b0; key = '0; text_in = '0;
    cyc = 1;
    while (!done && cyc < 40) begin
      @(negedge clk);
      cyc++;
    end
    check(done, "done seen");
    check(cyc == 12, $sformatf("latency %0d cycles, expected 12", cyc));
    check(text_out == expect_c, $sformatf("ciphertext %h expected %h", text_out, expect_c));
    @(negedge clk);
    check(!done, "done is a single-cycle pulse");
    check(text_out == expect_c, "result held after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
