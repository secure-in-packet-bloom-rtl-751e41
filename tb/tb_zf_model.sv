// tb_zf_model -- reference model used by the testbenches of the forwarding
// node: AES-128 and Moustique written as plain behavioural functions,
// independent of the RTL (S-box by exhaustive search for the inverse, the
// Moustique CCSR as per-cell arrays), plus the zFormation link-identifier
// rule and a builder for forwarding packets.
package tb_zf_model;

  // ------------------------------------------------------------- AES-128
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv = 8'h00, s;
    for (int c = 1; c < 256; c++)
      if (gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  function automatic logic [127:0] aes128(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] st [16], tmp [16], w [44][4], sb [256], rc;
    for (int i = 0; i < 256; i++) sb[i] = sbox(8'(i));
    for (int i = 0; i < 4; i++) for (int b = 0; b < 4; b++) w[i][b] = key[127-8*(4*i+b) -: 8];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      logic [7:0] t [4];
      for (int b = 0; b < 4; b++) t[b] = w[i-1][b];
      if (i % 4 == 0) begin
        logic [7:0] t0;
        t0 = t[0];
        t[0] = sb[t[1]] ^ rc; t[1] = sb[t[2]]; t[2] = sb[t[3]]; t[3] = sb[t0];
        rc = gmul(rc, 8'h02);
      end
      for (int b = 0; b < 4; b++) w[i][b] = w[i-4][b] ^ t[b];
    end
    for (int b = 0; b < 16; b++) st[b] = pt[127-8*b -: 8] ^ w[b/4][b%4];
    for (int r = 1; r <= 10; r++) begin
      for (int b = 0; b < 16; b++) tmp[b] = sb[st[b]];
      for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++)
        st[4*c+row] = tmp[4*((c+row)%4)+row];
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a [4];
          for (int row = 0; row < 4; row++) a[row] = st[4*c+row];
          for (int row = 0; row < 4; row++)
            st[4*c+row] = gmul(a[row], 8'h02) ^ gmul(a[(row+1)%4], 8'h03) ^
                          a[(row+2)%4] ^ a[(row+3)%4];
        end
      end
      for (int b = 0; b < 16; b++) st[b] ^= w[4*r + b/4][b%4];
    end
    for (int b = 0; b < 16; b++) aes128[127-8*b -: 8] = st[b];
  endfunction

  // ----------------------------------------------------------- Moustique
  function automatic int ncell(input int j);
    if (j <= 88) return 1;
    if (j <= 92) return 2;
    if (j <= 94) return 4;
    if (j == 95) return 8;
    return 16;
  endfunction

  class mq_model;
    bit q [97][16];
    bit a1 [53], a2 [53], a3 [53], a4 [53], a5 [53], a6 [12], a7 [3];
    bit key [96];

    function new(input logic [95:0] k);
      foreach (key[i]) key[i] = k[i];
    endfunction

    function bit z();
      return a7[0] ^ a7[1] ^ a7[2];
    endfunction

    function bit cellbit(input int j, input int i, input bit c);
      if (j == 0) return c;
      return q[j][i % ncell(j)];
    endfunction

    function bit flat(input int p);  // CCSR position 1..128, else 0
      for (int j = 1; j <= 96; j++)
        for (int i = 0; i < ncell(j); i++) begin
          int pos;
          if (i == 0) pos = j;
          else if (i == 1) pos = 96 + j - 88;
          else if (i <= 3) pos = 104 + (i-2)*4 + j - 92;
          else if (i <= 7) pos = 112 + (i-4)*2 + j - 94;
          else pos = 120 + i - 7;
          if (pos == p) return q[j][i];
        end
      return 1'b0;
    endfunction

    function void step(input bit c);
      bit nq [97][16];
      bit n1 [53], n2 [53], n3 [53], n4 [53], n5 [53], n6 [12], n7 [3];
      bit fl [129];
      for (int p = 0; p <= 128; p++) fl[p] = (p == 0) ? 1'b0 : flat(p);
      for (int j = 1; j <= 96; j++)
        for (int i = 0; i < ncell(j); i++) begin
          bit aa, bb, cc, dd;
          int d, v, w, f;
          if (j == 96 && i > 0) begin
            aa = cellbit(95, i % 8, c); bb = cellbit(95 - i, 0, c);
            cc = cellbit(94, i % 4, c); dd = cellbit(94 - i, i, c);
            nq[j][i] = (aa & ~bb) ^ (cc & ~dd);
          end else begin
            d = j - i;
            if (d % 3 == 1) begin f = 0; v = 2*(d-1)/3; w = j-2; end
            else if (d % 3 == 2) begin f = 1; v = j-4; w = j-2; end
            else if (d % 6 == 3) begin f = 1; v = 0; w = j-2; end
            else begin f = 1; v = j-5; w = 0; end
            aa = cellbit(j-1, i, c); bb = key[j-1];
            if (j <= 2) begin cc = 0; dd = 0; end
            else begin cc = cellbit(v, i, c); dd = cellbit(w, i, c); end
            nq[j][i] = (f == 0) ? (aa ^ bb ^ cc ^ dd) : (aa ^ bb ^ (cc & ~dd) ^ 1'b1);
          end
        end
      for (int i = 0; i < 53; i++) begin
        n1[(4*i)%53] = fl[128-i] ^ fl[i+18] ^ (fl[113-i] & ~fl[i+1]) ^ 1'b1;
        n2[(4*i)%53] = g1s(a1, i); n3[(4*i)%53] = g1s(a2, i);
        n4[(4*i)%53] = g1s(a3, i); n5[(4*i)%53] = g1s(a4, i);
      end
      for (int i = 0; i < 12; i++)
        n6[i] = a5[4*i] ^ a5[4*i+3] ^ (a5[4*i+1] & ~a5[4*i+2]) ^ 1'b1;
      for (int i = 0; i < 3; i++)
        n7[i] = a6[4*i] ^ a6[4*i+1] ^ a6[4*i+2] ^ a6[4*i+3];
      q = nq; a1 = n1; a2 = n2; a3 = n3; a4 = n4; a5 = n5; a6 = n6; a7 = n7;
    endfunction

    static function bit g1s(input bit a [53], input int i);
      bit x0, x1, x2, x3;
      x0 = a[i];
      x1 = (i + 3 < 53) ? a[i+3] : 1'b0;
      x2 = (i + 1 < 53) ? a[i+1] : 1'b0;
      x3 = (i + 2 < 53) ? a[i+2] : 1'b0;
      return x0 ^ x1 ^ (x2 & ~x3) ^ 1'b1;
    endfunction
  endclass

  // F3 with Moustique: feed the IV, then decrypt 40 bits
  function automatic logic [39:0] mq_f3(input logic [95:0] key, input logic [104:0] iv,
                                        input logic [39:0] din);
    mq_model m = new(key);
    logic [39:0] o;
    for (int t = 104; t >= 0; t--) m.step(iv[t]);
    for (int t = 39; t >= 0; t--) begin
      o[t] = din[t] ^ m.z();
      m.step(din[t]);
    end
    return o;
  endfunction

  // ----------------------------------------------------------- zFormation
  // 5-hot mask: 8-bit index p (most significant byte first) sets bit 255-p
  function automatic logic [255:0] mask_of(input logic [39:0] idx);
    logic [255:0] m = '0;
    for (int j = 0; j < 5; j++) m[255 - int'(idx[39-8*j -: 8])] = 1'b1;
    return m;
  endfunction

  function automatic logic [39:0] link_bits(input bit use_mq, input logic [255:0] k3,
                                            input logic [255:0] o2, input logic [255:0] nonce);
    logic [255:0] x;
    logic [127:0] ct;
    x = nonce ^ o2;
    if (use_mq) return mq_f3(k3[255 -: 96], 105'h0, x[255 -: 40]);
    ct = aes128(k3[255 -: 128], x[255 -: 128]);
    return ct[127 -: 40];
  endfunction

  typedef struct packed {
    logic [63:0] data;
    logic        last;
    logic [3:0]  bytes;
  } fw_t;

  // Ethernet frame with the forwarding header; payload bytes follow
  function automatic void build_frame(ref fw_t q [$], input logic [15:0] ethertype,
                                      input logic [255:0] nonce, input logic [7:0] ttl,
                                      input logic [255:0] bf, input int payload);
    byte unsigned b [$];
    int n;
    for (int i = 0; i < 12; i++) b.push_back(8'(8'h10 + i));
    b.push_back(ethertype[15:8]); b.push_back(ethertype[7:0]);
    b.push_back(8'h01); b.push_back(8'd36);
    for (int i = 0; i < 32; i++) b.push_back(nonce[255-8*i -: 8]);
    b.push_back(8'h00); b.push_back(8'd40); b.push_back(8'h00); b.push_back(8'h00);
    b.push_back(ttl); b.push_back(8'h00); b.push_back(8'h00); b.push_back(8'h00);
    for (int i = 0; i < 32; i++) b.push_back(bf[255-8*i -: 8]);
    for (int i = 0; i < payload; i++) b.push_back(8'(i * 7 + 3));
    q.delete();
    n = b.size();
    for (int w = 0; w < (n + 7) / 8; w++) begin
      fw_t f;
      f.data = '0;
      for (int k = 0; k < 8; k++)
        if (8*w + k < n) f.data[63-8*k -: 8] = b[8*w+k];
      f.last  = (w == (n + 7) / 8 - 1);
      f.bytes = f.last ? 4'(n - 8*w) : 4'd8;
      q.push_back(f);
    end
  endfunction

endpackage
