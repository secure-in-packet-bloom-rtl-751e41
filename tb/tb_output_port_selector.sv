// tb_output_port_selector -- self-checking test of the forwarding decision,
// for both cipher choices at once: an AES instance and a Moustique instance
// observe the same packet stream, chained on one register bus at two base
// addresses. K3 and four O2 values are written over the register bus (and one
// word read back). Expected link sets come from the reference model in
// tb_zf_model (independent AES and Moustique functions). Cases: broadcast from
// each Ethernet port (all links in the filter, incoming link excluded), paths
// that leave out one link, wrong ethertype, TTL 0, a filter with too many
// ones, a filter built with a different K3, a packet that ends inside the
// header, and random packets. Also checks the new TTL and the decision
// latency (15 clocks after nonce word 3 for AES, 43 after nonce word 2 for
// Moustique).
module tb_output_port_selector;
  import zf_pkg::*;
  import tb_zf_model::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_wr = 1'b0;
  pkt_word_t in_word = '0;
  logic rdy_a, rdy_m, dv_a, dv_m, drop_a, drop_m;
  logic [3:0] links_a, links_m;
  logic [7:0] ttl_a, ttl_m;
  reg_bus_t reg_in = '0, reg_mid, reg_out;
  int checks = 0, failures = 0;
  int cycle = 0, t_w2 = 0, t_w3 = 0, t_dec_a = 0, t_dec_m = 0;
  logic [255:0] k3 = 256'h2b7e151628aed2a6abf7158809cf4f3c_00112233445566778899aabbccddeeff;
  logic [255:0] o2 [4];

  always #4 clk = ~clk;
  always @(posedge clk) cycle++;

  output_port_selector #(.CIPHER(CIPHER_AES), .BASE_ADDR(23'h040000)) dut_a (
    .clk, .rst_n, .in_wr, .in_word, .ready(rdy_a), .dec_valid(dv_a),
    .dec_links(links_a), .dec_drop(drop_a), .dec_ttl(ttl_a),
    .reg_in, .reg_out(reg_mid));
  output_port_selector #(.CIPHER(CIPHER_MOUSTIQUE), .BASE_ADDR(23'h040040)) dut_m (
    .clk, .rst_n, .in_wr, .in_word, .ready(rdy_m), .dec_valid(dv_m),
    .dec_links(links_m), .dec_drop(drop_m), .dec_ttl(ttl_m),
    .reg_in(reg_mid), .reg_out);

  logic [3:0] got_a, got_m;
  logic [7:0] gttl_a, gttl_m;
  logic gdrop_a, gdrop_m;
  int ndec_a = 0, ndec_m = 0;
  always @(negedge clk) begin
    if (dv_a) begin got_a <= links_a; gttl_a <= ttl_a; gdrop_a <= drop_a; ndec_a++; t_dec_a = cycle; end
    if (dv_m) begin got_m <= links_m; gttl_m <= ttl_m; gdrop_m <= drop_m; ndec_m++; t_dec_m = cycle; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reg_access(input bit rd, input logic [22:0] addr, input logic [31:0] data,
                            output logic [31:0] rdata);
    @(negedge clk);
    reg_in = '{req: 1'b1, ack: 1'b0, rd_wr_l: rd, addr: addr, data: data, src: 2'd1};
    @(negedge clk);
    reg_in = '0;
    while (!reg_out.req) @(negedge clk);
    check(reg_out.ack && reg_out.addr == addr && reg_out.src == 2'd1, "register reply");
    rdata = reg_out.data;
  endtask

  task automatic load_keys(input logic [22:0] base, input logic [255:0] k);
    logic [31:0] r;
    for (int w = 0; w < 8; w++) reg_access(1'b0, base + 23'(w), k[255-32*w -: 32], r);
    for (int l = 0; l < 4; l++)
      for (int w = 0; w < 8; w++)
        reg_access(1'b0, base + 23'(8 + 8*l + w), o2[l][255-32*w -: 32], r);
  endtask

  // expected decision from the model
  function automatic logic [3:0] expect_links(input bit mq, input logic [255:0] key,
      input int src, input logic [15:0] et, input logic [7:0] ttl,
      input logic [255:0] nonce, input logic [255:0] bf);
    logic [3:0] e = '0;
    for (int l = 0; l < 4; l++) begin
      logic [255:0] m;
      m = mask_of(link_bits(mq, key, o2[l], nonce));
      e[l] = ((bf & m) == m);
    end
    if (src % 2 == 0) e[src/2] = 1'b0;
    if (et != 16'hacdc || ttl == 0 || $countones(bf) > 128) e = '0;
    return e;
  endfunction

  // bloom filter holding the identifiers of the given links, for one cipher
  function automatic logic [255:0] make_bf(input bit mq, input logic [255:0] key,
                                           input logic [3:0] links, input logic [255:0] nonce);
    logic [255:0] bf = '0;
    for (int l = 0; l < 4; l++)
      if (links[l]) bf |= mask_of(link_bits(mq, key, o2[l], nonce));
    return bf;
  endfunction

  task automatic send(input int src, input logic [15:0] et, input logic [255:0] nonce,
                      input logic [7:0] ttl, input logic [255:0] bf, input int payload,
                      input int cut = 0);
    fw_t q [$];
    build_frame(q, et, nonce, ttl, bf, payload);
    if (cut > 0) begin
      while (q.size() > cut) void'(q.pop_back());
      q[q.size()-1].last = 1'b1;
      q[q.size()-1].bytes = 4'd8;
    end
    @(negedge clk);
    while (!(rdy_a && rdy_m)) @(negedge clk);
    in_wr = 1'b1;
    in_word = '{ctrl: 8'hff, data: {16'h0, 16'(q.size()), 16'(src), 16'(q.size()*8)}};
    @(negedge clk);
    for (int w = 0; w < q.size(); w++) begin
      in_word = '{ctrl: q[w].last ? eop_ctrl(q[w].bytes) : 8'h00, data: q[w].data};
      if (w == 2) t_w2 = cycle;
      if (w == 3) t_w3 = cycle;
      @(negedge clk);
    end
    in_wr = 1'b0;
    in_word = '0;
  endtask

  // send one packet and check both instances against the model
  task automatic run_case(input string name, input int src, input logic [15:0] et,
                          input logic [255:0] nonce, input logic [7:0] ttl,
                          input logic [255:0] bf_a, input logic [255:0] bf_m,
                          input logic [255:0] key_a, input logic [255:0] key_m);
    logic [3:0] ea, em;
    int na, nm;
    na = ndec_a; nm = ndec_m;
    // the same packet stream feeds both: the filter is the union of both
    // ciphers' filters unless a case asks otherwise
    send(src, et, nonce, ttl, bf_a | bf_m, 40);
    while (ndec_a == na || ndec_m == nm) @(negedge clk);
    ea = expect_links(1'b0, key_a, src, et, ttl, nonce, bf_a | bf_m);
    em = expect_links(1'b1, key_m, src, et, ttl, nonce, bf_a | bf_m);
    check(got_a == ea, $sformatf("%s AES links %b expected %b", name, got_a, ea));
    check(got_m == em, $sformatf("%s Moustique links %b expected %b", name, got_m, em));
    check(gdrop_a == (ea == 0) && gdrop_m == (em == 0), {name, " drop flag"});
    check(gttl_a == ttl - 8'd1 && gttl_m == ttl - 8'd1, {name, " new TTL"});
    check(t_dec_a - t_w3 == 15, $sformatf("%s AES latency %0d", name, t_dec_a - t_w3));
    check(t_dec_m - t_w2 == 43, $sformatf("%s Moustique latency %0d", name, t_dec_m - t_w2));
  endtask

  initial begin
    logic [31:0] r;
    logic [255:0] n, bfa, bfm;
    logic [3:0] e;
    o2[0] = {8{32'h0f1e2d3c}};
    o2[1] = {8{32'h11223344}} ^ 256'h1;
    o2[2] = {4{64'hdeadbeefcafef00d}};
    o2[3] = {8{32'h55aa55aa}};
    // the model itself against known answers
    check(aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "model AES vector");
    check(mq_f3(96'h123456789abcdef012345678, 105'h0, 40'hacdc0badf0) == 40'hacab1bbfe4,
          "model Moustique vector");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_keys(23'h040000, k3);
    load_keys(23'h040040, k3);
    reg_access(1'b1, 23'h040000 + 23'(8 + 8*2 + 1), 32'h0, r);
    check(r == o2[2][223:192], $sformatf("read back O2 %h", r));
    repeat (120) @(negedge clk);
    reg_access(1'b1, 23'h040040 + 23'(STATUS_OFF), 32'h0, r);
    check(r[0], "Moustique initialized");

    // broadcast from each Ethernet port
    for (int s = 0; s < 8; s += 2) begin
      n = {8{32'(s * 1234567 + 89)}};
      bfa = make_bf(1'b0, k3, 4'b1111, n);
      bfm = make_bf(1'b1, k3, 4'b1111, n);
      run_case($sformatf("broadcast from %0d", s), s, 16'hacdc, n, 8'd64, bfa, bfm, k3, k3);
      e = 4'b1111; e[s/2] = 1'b0;
      check(got_a == e && got_m == e, "broadcast reaches all other links");
    end
    // one link left out of the path
    for (int l = 1; l < 4; l++) begin
      logic [3:0] p;
      p = 4'b1111; p[l] = 1'b0;
      n = {4{64'(l * 97 + 5)}};
      bfa = make_bf(1'b0, k3, p, n);
      bfm = make_bf(1'b1, k3, p, n);
      run_case($sformatf("link %0d not in path", l), 0, 16'hacdc, n, 8'd9, bfa, bfm, k3, k3);
    end
    n = {8{32'h76543210}};
    bfa = make_bf(1'b0, k3, 4'b1111, n);
    bfm = make_bf(1'b1, k3, 4'b1111, n);
    run_case("wrong ethertype", 0, 16'h0800, n, 8'd9, bfa, bfm, k3, k3);
    check(gdrop_a && gdrop_m, "wrong ethertype dropped");
    run_case("TTL zero", 0, 16'hacdc, n, 8'd0, bfa, bfm, k3, k3);
    check(gdrop_a && gdrop_m, "TTL 0 dropped");
    run_case("too many ones", 0, 16'hacdc, n, 8'd9, '1, '1, k3, k3);
    check(gdrop_a && gdrop_m, "full filter dropped");
    // filter made with another key: the node's key decides
    bfa = make_bf(1'b0, ~k3, 4'b1111, n);
    bfm = make_bf(1'b1, ~k3, 4'b1111, n);
    run_case("wrong key", 0, 16'hacdc, n, 8'd9, bfa, bfm, k3, k3);
    // random packets
    for (int i = 0; i < 6; i++) begin
      logic [3:0] p;
      n = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      p = 4'($urandom);
      bfa = make_bf(1'b0, k3, p, n);
      bfm = make_bf(1'b1, k3, p, n);
      run_case($sformatf("random %0d", i), 2 * ($urandom % 4) + ($urandom % 2), 16'hacdc, n,
               8'($urandom % 255 + 1), bfa, bfm, k3, k3);
    end
    // a packet cut off inside the nonce
    begin
      int na, nm;
      na = ndec_a; nm = ndec_m;
      send(0, 16'hacdc, n, 8'd9, '0, 0, 4);
      while (ndec_a == na || ndec_m == nm) @(negedge clk);
      check(gdrop_a && gdrop_m, "short packet dropped");
    end
    reg_access(1'b1, 23'h040000 + 23'(DROP_CNT_OFF), 32'h0, r);
    check(r >= 4, $sformatf("drop counter %0d", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
