// tb_rx_queue -- self-checking test of the receive queue. Sends frames of
// random lengths (1..14 words, random valid bytes in the last word) with
// random gaps, while the downstream ready is randomly withheld. Checks that
// every packet leaves as one I/O queue header (ctrl 0xFF, word and byte
// length, source port) followed by the unchanged frame words with ctrl 0 and
// the end-of-packet byte mask on the last word, in order, and that a short
// FIFO back-pressures the sender without losing words.
module tb_rx_queue;
  import zf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid = 1'b0, rx_ready, out_wr, out_rdy = 1'b0;
  frame_word_t rx_word = '0;
  pkt_word_t out_word;
  int checks = 0, failures = 0;
  pkt_word_t expq [$];
  int npkt = 0, nout = 0, stalls = 0;
  bit sending_done = 1'b0;

  always #4 clk = ~clk;

  rx_queue #(.DEPTH(16), .LEN_DEPTH(4), .PORT_NUM(3'd4)) dut (
    .clk, .rst_n, .rx_valid, .rx_word, .rx_ready, .out_wr, .out_word, .out_rdy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // receiver: random ready, compare every word
  bit hold = 1'b0;   // withholds ready for a while to fill the queue
  initial begin
    repeat (300) @(negedge clk);
    hold = 1'b1;
    repeat (200) @(negedge clk);
    hold = 1'b0;
  end
  always @(negedge clk) out_rdy = rst_n && !hold && ($urandom % 4 != 0);
  always @(posedge clk) if (rst_n && out_wr) begin
    pkt_word_t e;
    if (expq.size() == 0) begin
      check(1'b0, "unexpected word");
    end else begin
      e = expq.pop_front();
      check(out_word == e, $sformatf("word %0d: %h/%h expected %h/%h", nout,
            out_word.ctrl, out_word.data, e.ctrl, e.data));
    end
    nout++;
  end
  always @(posedge clk) if (rx_valid && !rx_ready) stalls++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 60; p++) begin
      int nw, nb;
      nw = 1 + $urandom % 14;   // store and forward: a packet must fit the FIFO
      nb = 1 + $urandom % 8;
      expq.push_back('{ctrl: 8'hff, data: {16'h0, 16'(nw), 16'd4, 16'(8*(nw-1) + nb)}});
      for (int w = 0; w < nw; w++) begin
        frame_word_t f;
        f.data  = {$urandom, $urandom};
        f.last  = (w == nw - 1);
        f.bytes = f.last ? 4'(nb) : 4'd8;
        expq.push_back('{ctrl: f.last ? eop_ctrl(f.bytes) : 8'h00, data: f.data});
        @(negedge clk);
        rx_valid = 1'b1; rx_word = f;
        @(posedge clk);
        while (!rx_ready) @(posedge clk);
        @(negedge clk);
        rx_valid = 1'b0;
        if ($urandom % 3 == 0) @(negedge clk);
      end
      npkt++;
    end
    while (expq.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check(nout > 0 && expq.size() == 0, "all words delivered");
    check(stalls > 0, "sender was back-pressured");
    check(!out_wr, "idle at end");
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
