// tb_output_queues -- self-checking test of the packet store, decision and
// copy stage (AES link identifiers). Packets in I/O-queue format (module
// header + frame words) are written on the input packet bus whenever in_rdy
// allows; every output queue's words are compared with the expected copy:
// header with the destination field set to the selected queues, frame words
// unchanged except the TTL byte of frame word 6, which must hold TTL-1.
// Dropped packets must leave no trace. Output readiness is withheld for a
// while so the output queues fill and the store has to wait.
module tb_output_queues;
  import zf_pkg::*;
  import tb_zf_model::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_wr = 1'b0, in_rdy;
  pkt_word_t in_word = '0;
  logic [7:0] out_wr, out_rdy;
  pkt_word_t [7:0] out_word;
  reg_bus_t reg_in = '0, reg_out;
  int checks = 0, failures = 0, n_fwd = 0, n_drop = 0, n_full = 0;
  logic [255:0] k3 = {8{32'h0badcafe}};
  logic [255:0] o2 [4];
  pkt_word_t expq [8][$];
  bit hold = 1'b0;

  always #4 clk = ~clk;

  output_queues #(.OQ_DEPTH(32)) dut (.clk, .rst_n, .in_wr, .in_word, .in_rdy,
                                      .out_wr, .out_word, .out_rdy, .reg_in, .reg_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) out_rdy = (rst_n && !hold) ? 8'($urandom) | 8'h55 & 8'($urandom) : 8'h00;
  always @(posedge clk) if (rst_n) begin
    if (dut.oq_full != 0) n_full++;
    for (int q = 0; q < 8; q++) if (out_wr[q]) begin
      pkt_word_t e;
      if (expq[q].size() == 0) check(1'b0, $sformatf("queue %0d: unexpected word", q));
      else begin
        e = expq[q].pop_front();
        check(out_word[q] == e, $sformatf("queue %0d: %h/%h expected %h/%h", q,
              out_word[q].ctrl, out_word[q].data, e.ctrl, e.data));
      end
    end
  end

  task automatic reg_write(input logic [22:0] addr, input logic [31:0] data);
    @(negedge clk);
    reg_in = '{req: 1'b1, ack: 1'b0, rd_wr_l: 1'b0, addr: addr, data: data, src: 2'd0};
    @(negedge clk);
    reg_in = '0;
  endtask

  task automatic put(input pkt_word_t w);
    @(negedge clk);
    while (!in_rdy) @(negedge clk);
    in_wr = 1'b1; in_word = w;
    @(negedge clk);
    in_wr = 1'b0; in_word = '0;
  endtask

  task automatic packet(input int src, input logic [7:0] ttl, input logic [3:0] links,
                        input bit bad_et);
    logic [255:0] nonce, bf;
    logic [3:0] e;
    logic [7:0] dst;
    fw_t q [$];
    for (int i = 0; i < 8; i++) nonce[32*i +: 32] = $urandom;
    bf = '0;
    for (int l = 0; l < 4; l++) if (links[l]) bf |= mask_of(link_bits(1'b0, k3, o2[l], nonce));
    for (int l = 0; l < 4; l++)
      e[l] = (bf & mask_of(link_bits(1'b0, k3, o2[l], nonce))) == mask_of(link_bits(1'b0, k3, o2[l], nonce));
    if (src % 2 == 0) e[src/2] = 1'b0;
    if (bad_et || ttl == 0) e = '0;
    dst = '0;
    for (int l = 0; l < 4; l++) dst[2*l] = e[l];
    if (e == 0) n_drop++; else n_fwd++;
    build_frame(q, bad_et ? 16'h86dd : ZF_ETHERTYPE, nonce, ttl, bf, $urandom % 120);
    for (int qq = 0; qq < 8; qq++) if (dst[qq]) begin
      expq[qq].push_back('{ctrl: 8'hff, data: {8'h0, dst, 16'(q.size()), 16'(src), 16'(q.size()*8)}});
      foreach (q[w]) begin
        pkt_word_t x;
        x = '{ctrl: q[w].last ? eop_ctrl(q[w].bytes) : 8'h00, data: q[w].data};
        if (w == 6) x.data[31:24] = ttl - 8'd1;
        expq[qq].push_back(x);
      end
    end
    put('{ctrl: 8'hff, data: {16'h0, 16'(q.size()), 16'(src), 16'(q.size()*8)}});
    foreach (q[w]) put('{ctrl: q[w].last ? eop_ctrl(q[w].bytes) : 8'h00, data: q[w].data});
  endtask

  initial begin
    o2[0] = {4{64'h0123456789abcdef}}; o2[1] = {4{64'h1111222233334444}};
    o2[2] = {4{64'h5555666677778888}}; o2[3] = {4{64'h99990000aaaabbbb}};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 8; w++) reg_write(23'h040000 + 23'(w), k3[255-32*w -: 32]);
    for (int l = 0; l < 4; l++) for (int w = 0; w < 8; w++)
      reg_write(23'h040000 + 23'(8 + 8*l + w), o2[l][255-32*w -: 32]);
    packet(0, 8'd10, 4'b1111, 1'b0);
    packet(3, 8'd10, 4'b1111, 1'b0);
    packet(2, 8'd10, 4'b1010, 1'b1);
    packet(4, 8'd0, 4'b1111, 1'b0);
    hold = 1'b1;
    for (int i = 0; i < 20; i++) begin
      if (i == 10) hold = 1'b0;
      packet($urandom % 8, 8'(1 + $urandom % 250), 4'($urandom), 1'b0);
    end
    for (int t = 0; t < 20000; t++) begin
      automatic bit empty = 1'b1;
      for (int q = 0; q < 8; q++) if (expq[q].size() != 0) empty = 1'b0;
      if (empty) break;
      @(negedge clk);
    end
    repeat (10) @(negedge clk);
    for (int q = 0; q < 8; q++)
      check(expq[q].size() == 0, $sformatf("queue %0d: %0d words missing", q, expq[q].size()));
    check(n_fwd > 0 && n_drop >= 2, "forwarded and dropped packets seen");
    check(n_full > 0, "an output queue filled up");
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
