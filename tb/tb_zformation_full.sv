// tb_zformation_full -- full-size run of the forwarding node: one
// zformation_top with every parameter at its default (AES-128 link
// identifiers, 512-word receive and transmit queues, 1024-word packet store),
// no overrides. Same checking scheme as tb_zformation_top: K3 and O2 are
// written over the register bus, packets go in on all eight receive streams,
// and every frame leaving a transmit stream is matched against the reference
// model (links from the Bloom filter minus the incoming link, TTL
// decremented, host queues silent). Mechanisms counted and required:
// multi-link forwarding, incoming-link exclusion, host-queue packet
// forwarded, drop on ethertype / TTL 0 / too many ones / another key, TTL
// rewrite, simultaneous inputs, transmit back-pressure, and the forward /
// drop counters read back over the register bus.
module tb_zformation_full;
  import zf_pkg::*;
  import tb_zf_model::*;

  localparam int ND = 1;   // one node, default parameters

  logic clk = 1'b0, rst_n = 1'b0;
  logic        [7:0] rx_valid [ND];
  frame_word_t [7:0] rx_word  [ND];
  logic        [7:0] rx_ready [ND];
  logic        [7:0] tx_valid [ND];
  frame_word_t [7:0] tx_word  [ND];
  logic        [7:0] tx_ready [ND];
  reg_bus_t reg_in = '0, reg_out;
  int checks = 0, failures = 0;
  logic [255:0] k3 = 256'h000102030405060708090a0b0c0d0e0f_f0e1d2c3b4a5968778695a4b3c2d1e0f;
  logic [255:0] o2 [4];
  logic [22:0]  base [ND] = '{23'h040000};

  // mechanism counters
  int n_multi = 0, n_excl = 0, n_host = 0, n_et = 0, n_ttl = 0, n_ones = 0;
  int n_key = 0, n_ttl_rw = 0, n_parallel = 0, n_stall = 0;
  int n_fwd [ND] = '{0}, n_drop [ND] = '{0};

  always #4 clk = ~clk;

  zformation_top dut_a (
    .clk, .rst_n, .rx_valid(rx_valid[0]), .rx_word(rx_word[0]), .rx_ready(rx_ready[0]),
    .tx_valid(tx_valid[0]), .tx_word(tx_word[0]), .tx_ready(tx_ready[0]),
    .reg_in, .reg_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] sig_step(input logic [63:0] s, input fw_t w);
    return {s[62:0], s[63]} ^ w.data ^ {w.last, 59'h0, w.bytes} ^ 64'h9e3779b97f4a7c15;
  endfunction

  function automatic logic [63:0] sig_of(ref fw_t q [$]);
    logic [63:0] s = '0;
    foreach (q[i]) s = sig_step(s, q[i]);
    return s;
  endfunction

  // ------------------------------------------------------ transmit side
  logic [63:0] exp_sig [ND][8][$];
  logic [63:0] cur_sig [ND][8];
  bit hold = 1'b0;

  always @(negedge clk)
    for (int d = 0; d < ND; d++)
      for (int p = 0; p < 8; p++) tx_ready[d][p] = rst_n && !hold && ($urandom % 4 != 0);

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < ND; d++) begin
      for (int p = 0; p < 8; p++) begin
        if (tx_valid[d][p] && !tx_ready[d][p]) n_stall++;
        if (tx_valid[d][p] && tx_ready[d][p]) begin
          fw_t w;
          w = fw_t'(tx_word[d][p]);
          cur_sig[d][p] = sig_step(cur_sig[d][p], w);
          if (w.last) begin
            int hit;
            hit = -1;
            foreach (exp_sig[d][p][i]) if (exp_sig[d][p][i] == cur_sig[d][p]) hit = i;
            check(hit >= 0, $sformatf("node %0d port %0d: unexpected frame", d, p));
            if (hit >= 0) exp_sig[d][p].delete(hit);
            cur_sig[d][p] = '0;
          end
        end
      end
    end
  end

  // ------------------------------------------------------- receive side
  always @(posedge clk) if (rst_n && $countones(rx_valid[0]) >= 2) n_parallel++;

  task automatic send_frame(input int d, input int p, ref fw_t q [$]);
    foreach (q[i]) begin
      @(negedge clk);
      rx_valid[d][p] = 1'b1;
      rx_word[d][p]  = frame_word_t'(q[i]);
      @(posedge clk);
      while (!rx_ready[d][p]) @(posedge clk);
    end
    @(negedge clk);
    rx_valid[d][p] = 1'b0;
  endtask

  function automatic logic [255:0] make_bf(input bit mq, input logic [255:0] key,
                                           input logic [3:0] links, input logic [255:0] nonce);
    logic [255:0] bf = '0;
    for (int l = 0; l < 4; l++)
      if (links[l]) bf |= mask_of(link_bits(mq, key, o2[l], nonce));
    return bf;
  endfunction

  // one packet into both nodes; filters are built for the given link set
  // with each node's own cipher (keyed with key, normally the node's K3)
  task automatic packet(input int src, input logic [15:0] et, input logic [7:0] ttl,
                        input logic [3:0] links, input logic [255:0] key,
                        input bit full_bf, input int payload);
    logic [255:0] nonce;
    for (int i = 0; i < 8; i++) nonce[32*i +: 32] = $urandom;
    for (int d = 0; d < ND; d++) begin
      fw_t q [$], oq [$];
      logic [255:0] bf;
      logic [3:0] e;
      bf = full_bf ? '1 : make_bf(d == 1, key, links, nonce);
      for (int l = 0; l < 4; l++) begin
        logic [255:0] m;
        m = mask_of(link_bits(d == 1, k3, o2[l], nonce));
        e[l] = ((bf & m) == m);
      end
      if (src % 2 == 0 && e[src/2]) begin
        e[src/2] = 1'b0;
        if (d == 0) n_excl++;
      end
      if (et != ZF_ETHERTYPE || ttl == 8'd0 || $countones(bf) > 128) e = '0;
      if (e == 0) n_drop[d]++; else n_fwd[d]++;
      if (d == 0) begin
        if ($countones(e) >= 2) n_multi++;
        if (src % 2 == 1 && e != 0) n_host++;
        if (et != ZF_ETHERTYPE) n_et++;
        else if (ttl == 8'd0) n_ttl++;
        else if (full_bf) n_ones++;
        else if (key != k3 && links != 0 && e == 0) n_key++;
        if (e != 0) n_ttl_rw++;
      end
      build_frame(oq, et, nonce, ttl - 8'd1, bf, payload);
      for (int l = 0; l < 4; l++) if (e[l]) exp_sig[d][2*l].push_back(sig_of(oq));
      build_frame(q, et, nonce, ttl, bf, payload);
      send_frame(d, src, q);
    end
  endtask

  task automatic burst(input int src);
    for (int i = 0; i < 3; i++)
      packet(src, ZF_ETHERTYPE, 8'(1 + $urandom % 200), 4'($urandom), k3, 1'b0, $urandom % 300);
  endtask

  // ------------------------------------------------------- register bus
  task automatic reg_access(input bit rd, input logic [22:0] addr, input logic [31:0] data,
                            output logic [31:0] rdata);
    @(negedge clk);
    reg_in = '{req: 1'b1, ack: 1'b0, rd_wr_l: rd, addr: addr, data: data, src: 2'd0};
    @(negedge clk);
    reg_in = '0;
    while (!reg_out.req) @(negedge clk);
    check(reg_out.ack && reg_out.addr == addr, "register reply");
    rdata = reg_out.data;
  endtask

  function automatic bit all_delivered();
    for (int d = 0; d < ND; d++) for (int p = 0; p < 8; p++)
      if (exp_sig[d][p].size() != 0) return 1'b0;
    return 1'b1;
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    logic [31:0] r;
    for (int d = 0; d < ND; d++) begin
      rx_valid[d] = '0; rx_word[d] = '0; tx_ready[d] = '0;
      for (int p = 0; p < 8; p++) cur_sig[d][p] = '0;
    end
    o2[0] = {8{32'h31415926}};
    o2[1] = {8{32'h27182818}};
    o2[2] = {8{32'h16180339}};
    o2[3] = {8{32'h14142135}};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < ND; d++) begin
      for (int w = 0; w < 8; w++) reg_access(1'b0, base[d] + 23'(w), k3[255-32*w -: 32], r);
      for (int l = 0; l < 4; l++) for (int w = 0; w < 8; w++)
        reg_access(1'b0, base[d] + 23'(8 + 8*l + w), o2[l][255-32*w -: 32], r);
    end
    repeat (120) @(negedge clk);

    // broadcast from every Ethernet port: all links but the incoming one
    for (int s = 0; s < 8; s += 2) packet(s, ZF_ETHERTYPE, 8'd64, 4'b1111, k3, 1'b0, 40);
    // from the host queues
    packet(1, ZF_ETHERTYPE, 8'd3, 4'b0110, k3, 1'b0, 100);
    packet(5, ZF_ETHERTYPE, 8'd1, 4'b1001, k3, 1'b0, 8);
    // drops
    packet(0, 16'h0800, 8'd64, 4'b1110, k3, 1'b0, 40);
    packet(2, ZF_ETHERTYPE, 8'd0, 4'b1101, k3, 1'b0, 40);
    packet(4, ZF_ETHERTYPE, 8'd64, 4'b0000, k3, 1'b1, 40);
    packet(6, ZF_ETHERTYPE, 8'd64, 4'b0111, ~k3, 1'b0, 40);
    // several inputs at once, random paths and lengths, MACs slowed down
    hold = 1'b1;
    fork
      begin repeat (400) @(negedge clk); hold = 1'b0; end
      burst(0); burst(1); burst(2); burst(3); burst(4); burst(5); burst(6); burst(7);
    join
    for (int t = 0; t < 40000 && !all_delivered(); t++) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int d = 0; d < ND; d++) for (int p = 0; p < 8; p++)
      check(exp_sig[d][p].size() == 0,
            $sformatf("node %0d port %0d: %0d frames missing", d, p, exp_sig[d][p].size()));
    for (int d = 0; d < ND; d++) begin
      reg_access(1'b1, base[d] + 23'(FWD_CNT_OFF), 32'h0, r);
      check(r == 32'(n_fwd[d]), $sformatf("node %0d forward counter %0d expected %0d", d, r, n_fwd[d]));
      reg_access(1'b1, base[d] + 23'(DROP_CNT_OFF), 32'h0, r);
      check(r == 32'(n_drop[d]), $sformatf("node %0d drop counter %0d expected %0d", d, r, n_drop[d]));
    end
    check(n_multi > 0, "mechanism: multi-link forwarding");
    check(n_excl > 0, "mechanism: incoming link excluded");
    check(n_host > 0, "mechanism: packet from host queue forwarded");
    check(n_et > 0, "mechanism: ethertype drop");
    check(n_ttl > 0, "mechanism: TTL 0 drop");
    check(n_ones > 0, "mechanism: too many ones drop");
    check(n_key > 0, "mechanism: filter of another key dropped");
    check(n_ttl_rw > 0, "mechanism: TTL rewritten");
    check(n_parallel > 0, "mechanism: simultaneous inputs");
    check(n_stall > 0, "mechanism: transmit held while MAC not ready");
    $display("mechanisms: multi %0d excl %0d host %0d et %0d ttl %0d ones %0d key %0d ttl_rw %0d parallel %0d stall %0d",
             n_multi, n_excl, n_host, n_et, n_ttl, n_ones, n_key, n_ttl_rw, n_parallel, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
