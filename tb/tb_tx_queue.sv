// tb_tx_queue -- self-checking test of the transmit queue. Writes packets
// made of one or two module header words (ctrl 0xFF and another non-zero
// ctrl) followed by frame words, with random gaps, while the MAC side ready
// is randomly withheld. Checks that only the frame words come out, in order,
// with last set on the end-of-packet word and the byte count decoded from its
// ctrl mask, and that in_rdy falls when the queue is full.
module tb_tx_queue;
  import zf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_wr = 1'b0, in_rdy, tx_valid, tx_ready = 1'b0;
  pkt_word_t in_word = '0;
  frame_word_t tx_word;
  int checks = 0, failures = 0, nout = 0, full_seen = 0;
  frame_word_t expq [$];

  always #4 clk = ~clk;

  tx_queue #(.DEPTH(8)) dut (.clk, .rst_n, .in_wr, .in_word, .in_rdy,
                             .tx_valid, .tx_word, .tx_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit hold = 1'b0;   // withholds ready for a while to fill the queue
  initial begin
    repeat (300) @(negedge clk);
    hold = 1'b1;
    repeat (200) @(negedge clk);
    hold = 1'b0;
  end
  always @(negedge clk) tx_ready = rst_n && !hold && ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    frame_word_t e;
    if (expq.size() == 0) check(1'b0, "unexpected word");
    else begin
      e = expq.pop_front();
      check(tx_word == e, $sformatf("word %0d: %h %b %0d expected %h %b %0d", nout,
            tx_word.data, tx_word.last, tx_word.bytes, e.data, e.last, e.bytes));
    end
    nout++;
  end
  always @(posedge clk) if (rst_n && !in_rdy) full_seen++;

  task automatic put(input pkt_word_t w);
    @(negedge clk);
    while (!in_rdy) @(negedge clk);
    in_wr = 1'b1; in_word = w;
    @(negedge clk);
    in_wr = 1'b0; in_word = '0;
    if ($urandom % 4 == 0) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 50; p++) begin
      int nw, nb;
      nw = 2 + $urandom % 19;   // Ethernet frames are at least eight words
      nb = 1 + $urandom % 8;
      put('{ctrl: 8'hff, data: {16'h1, 16'(nw), 16'h0, 16'(8*(nw-1)+nb)}});
      if (p % 3 == 0) put('{ctrl: 8'hfe, data: {$urandom, $urandom}});
      for (int w = 0; w < nw; w++) begin
        frame_word_t f;
        f.data = {$urandom, $urandom};
        f.last = (w == nw - 1);
        f.bytes = f.last ? 4'(nb) : 4'd8;
        expq.push_back(f);
        put('{ctrl: f.last ? eop_ctrl(f.bytes) : 8'h00, data: f.data});
      end
    end
    while (expq.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    check(!tx_valid, "queue empty at end");
    check(full_seen > 0, "queue filled up at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
