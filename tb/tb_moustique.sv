// tb_moustique -- self-checking test of the per-link Moustique F3 engine.
// Expected outputs come from an independent bit-level model of the cipher:
// 105 IV bits are fed after the key is loaded, then 40 bits of the packet
// value are decrypted. Checks the decrypted bits, the 40-cycle latency from
// start_moustique to decrypted_data_ready, that ready is a single pulse, that
// every packet starts again from the post-IV state (same input, same output),
// that a start given during initialization is served afterwards, and a
// second instance with a non-zero IV.
module tb_moustique;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [95:0] key = '0, key2 = 96'hfedcba9876543210f0e1d2c3;
  logic start_initialization = 1'b0, start_moustique = 1'b0;
  logic start_init2 = 1'b0, start2 = 1'b0;
  logic [39:0] cipher_in = '0, cin2 = '0, dd, dd2;
  logic rdy, rdy2, initialized, initialized2;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  moustique dut (.clk, .rst_n, .key, .start_initialization, .start_moustique,
                 .cipher_in, .decrypted_data(dd), .decrypted_data_ready(rdy),
                 .initialized);
  moustique #(.IV(105'h01abcdef0123456789abcdef015)) dut2 (
                 .clk, .rst_n, .key(key2), .start_initialization(start_init2),
                 .start_moustique(start2), .cipher_in(cin2),
                 .decrypted_data(dd2), .decrypted_data_ready(rdy2),
                 .initialized(initialized2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_key(input logic [95:0] k);
    @(negedge clk);
    key = k; start_initialization = 1'b1;
    @(negedge clk);
    start_initialization = 1'b0;
    repeat (120) @(negedge clk);
    check(initialized, "initialized after IV");
  endtask

  task automatic run(input logic [39:0] d, input logic [39:0] expect_o);
    int cyc;
    @(negedge clk);
    cipher_in = d; start_moustique = 1'b1;
    @(negedge clk);
    start_moustique = 1'b0; cipher_in = '0;
    cyc = 1;
    while (!rdy && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc == 40, $sformatf("latency %0d, expected 40", cyc));
    check(dd == expect_o, $sformatf("in %h out %h expected %h", d, dd, expect_o));
    @(negedge clk);
    check(!rdy, "ready is one pulse");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_key(96'h0);
    run(40'h0, 40'hffffffffff);
    load_key(96'h123456789abcdef012345678);
    run(40'hacdc0badf0, 40'hacab1bbfe4);
    run(40'hacdc0badf0, 40'hacab1bbfe4);   // same packet value, same result
    load_key(96'h269e0d37f2a74de452e6b438);
    run(40'ha66513270e, 40'h5905f191f1);
    load_key(96'hd23f0824128b2f330c5c7fd0);
    run(40'h18892f902b, 40'he7729778d8);
    // start while the IV is still being fed
    @(negedge clk);
    key = 96'h0ed904759531985d5d9dc9f8; start_initialization = 1'b1;
    @(negedge clk);
    start_initialization = 1'b0;
    repeat (10) @(negedge clk);
    cipher_in = 40'h81e8e25d94; start_moustique = 1'b1;
    @(negedge clk);
    start_moustique = 1'b0;
    while (!rdy) @(negedge clk);
    check(dd == 40'h81c52c3032, $sformatf("deferred run %h", dd));
    // non-zero IV instance
    @(negedge clk); start_init2 = 1'b1; @(negedge clk); start_init2 = 1'b0;
    repeat (120) @(negedge clk);
    check(initialized2, "second instance initialized");
    cin2 = 40'h0123456789; start2 = 1'b1; @(negedge clk); start2 = 1'b0;
    while (!rdy2) @(negedge clk);
    check(dd2 == 40'h213120f78d, $sformatf("IV run 1 %h", dd2));
    @(negedge clk);
    cin2 = 40'hffffffffff; start2 = 1'b1; @(negedge clk); start2 = 1'b0;
    while (!rdy2) @(negedge clk);
    check(dd2 == 40'hdfd3c19009, $sformatf("IV run 2 %h", dd2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
