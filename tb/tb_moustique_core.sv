// tb_moustique_core -- self-checking test of the Moustique cipher function.
// An encryptor (c = m ^ z, c fed back) and a decryptor (m = c ^ z, c fed in)
// share a key. Starting from the same state the decryptor must return every
// plaintext bit. Then the decryptor is thrown out of step by 150 random
// ciphertext bits of its own; being self-synchronizing, it must recover the
// plaintext once it has seen 105 + 9 ciphertext bits again. Also checks the
// keystream of the all-zero state with an all-zero key and input against an
// independent bit-level model of the cipher and that a zero-key run with a one-bit
// difference in the key changes the keystream.
module tb_moustique_core;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [95:0] key = 96'h5a5a_0f0f_1234_8765_cafe_f00d;
  logic en = 1'b0, m_bit = 1'b0, c_enc, z_enc, z_dec, c_dec_in;
  logic use_noise = 1'b0, noise = 1'b0;
  logic z0, z1;
  logic [95:0] key1 = 96'h1;
  // keystream of the zero key from the reset state with zero input, bit t at [199-t]
  localparam logic [199:0] ZREF = 200'h4a1eec4ed3353bbf7ae0f4887ffffffffffffffffffffffff;
  int checks = 0, failures = 0, diff = 0;

  always #4 clk = ~clk;

  assign c_enc    = m_bit ^ z_enc;
  assign c_dec_in = use_noise ? noise : c_enc;

  moustique_core enc (.clk, .rst_n, .en, .c_in(c_enc), .key, .save(1'b0),
                      .from_saved(1'b0), .z(z_enc));
  moustique_core dec (.clk, .rst_n, .en, .c_in(c_dec_in), .key, .save(1'b0),
                      .from_saved(1'b0), .z(z_dec));
  moustique_core zk  (.clk, .rst_n, .en, .c_in(1'b0), .key('0), .save(1'b0),
                      .from_saved(1'b0), .z(z0));
  moustique_core ok1 (.clk, .rst_n, .en, .c_in(1'b0), .key(key1), .save(1'b0),
                      .from_saved(1'b0), .z(z1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    // in step from reset
    for (int t = 0; t < 200; t++) begin
      m_bit = 1'($urandom);
      #1;
      check((c_dec_in ^ z_dec) == m_bit, $sformatf("in-step bit %0d", t));
      check(z0 == ZREF[199-t], $sformatf("zero key keystream bit %0d", t));
      if (z0 != z1) diff++;
      @(negedge clk);
    end
    check(diff > 0, "one key bit changes the keystream");
    // desynchronize the decryptor
    use_noise = 1'b1;
    for (int t = 0; t < 150; t++) begin
      noise = 1'($urandom);
      m_bit = 1'($urandom);
      @(negedge clk);
    end
    use_noise = 1'b0;
    diff = 0;
    for (int t = 0; t < 400; t++) begin
      m_bit = 1'($urandom);
      #1;
      if (t < 20 && ((c_dec_in ^ z_dec) != m_bit)) diff++;
      if (t >= 114) check((c_dec_in ^ z_dec) == m_bit, $sformatf("resync bit %0d", t));
      @(negedge clk);
    end
    check(diff > 0, "decryptor was out of step before resynchronizing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
