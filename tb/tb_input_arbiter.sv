// tb_input_arbiter -- self-checking test of the input arbiter. Eight
// producers write packets (header word, 1..12 frame words, end word) into
// their inputs at random times while the output ready is randomly withheld.
// Checks that words of different packets are never interleaved, that every
// packet of every input arrives complete and in per-input order, that all
// inputs get served, and that a word written into an idle arbiter leaves two
// clocks later (one clock in the input FIFO, then out).
module tb_input_arbiter;
  import zf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] in_wr = '0, in_rdy;
  pkt_word_t [7:0] in_word = '0;
  logic out_wr, out_rdy = 1'b0;
  pkt_word_t out_word;
  int checks = 0, failures = 0, cycle = 0;
  pkt_word_t expq [8][$];
  int cur_src = -1, served [8];
  bit free_run = 1'b0;

  always #4 clk = ~clk;
  always @(posedge clk) cycle++;

  input_arbiter dut (.clk, .rst_n, .in_wr, .in_word, .in_rdy, .out_wr, .out_word, .out_rdy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the source queue is carried in data[18:16] of every word
  always @(negedge clk) out_rdy = rst_n && (free_run || $urandom % 4 != 0);
  always @(posedge clk) if (rst_n && out_wr) begin
    int s;
    pkt_word_t e;
    s = int'(out_word.data[18:16]);
    if (cur_src < 0) begin
      check(out_word.ctrl == 8'hff, "packet starts with header");
      cur_src = s;
    end
    check(s == cur_src, "no interleaving");
    if (expq[s].size() == 0) check(1'b0, "unexpected word");
    else begin
      e = expq[s].pop_front();
      check(out_word == e, $sformatf("input %0d word mismatch", s));
    end
    if (out_word.ctrl != 8'hff && out_word.ctrl != 8'h00) begin
      served[s]++;
      cur_src = -1;
    end
  end

  task automatic producer(input int s, input int npkt);
    for (int p = 0; p < npkt; p++) begin
      int nw;
      nw = 1 + $urandom % 12;
      for (int w = 0; w < nw + 2; w++) begin
        pkt_word_t x;
        x.ctrl = (w == 0) ? 8'hff : (w == nw + 1) ? 8'h10 : 8'h00;
        x.data = {16'(p), 16'(w), 13'h0, 3'(s), 16'($urandom)};
        expq[s].push_back(x);
        @(negedge clk);
        while (!in_rdy[s]) @(negedge clk);
        in_wr[s] = 1'b1; in_word[s] = x;
        @(negedge clk);
        in_wr[s] = 1'b0;
        repeat ($urandom % 3) @(negedge clk);
      end
    end
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // latency through an idle arbiter
    free_run = 1'b1;
    @(negedge clk);
    expq[5].push_back('{ctrl: 8'hff, data: 64'h0000_0000_0005_0000});
    expq[5].push_back('{ctrl: 8'h80, data: 64'h0000_0000_0005_0001});
    in_wr[5] = 1'b1; in_word[5] = expq[5][0]; t0 = cycle;
    @(negedge clk);
    in_word[5] = expq[5][1];
    @(negedge clk);
    in_wr[5] = 1'b0;
    while (!out_wr) @(negedge clk);
    check(cycle - t0 == 2, $sformatf("idle latency %0d", cycle - t0));
    repeat (4) @(negedge clk);
    free_run = 1'b0;
    served[5] = 0;
    fork
      producer(0, 12); producer(1, 12); producer(2, 12); producer(3, 12);
      producer(4, 12); producer(5, 12); producer(6, 12); producer(7, 12);
    join
    for (int s = 0; s < 8; s++) while (expq[s].size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int s = 0; s < 8; s++)
      check(served[s] == 12, $sformatf("input %0d served %0d packets", s, served[s]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
