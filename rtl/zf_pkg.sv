// zf_pkg -- types, constants and helper functions shared by the zFormation
// forwarding node.
//
// The packet bus is the 64-bit data / 8-bit control word bus of the NetFPGA
// reference pipeline. A packet is a run of words: first the module headers
// (ctrl non-zero, the I/O-queue header has ctrl = 0xFF), then the Ethernet
// frame (ctrl = 0x00), ending on a word whose ctrl is a one-hot marker of the
// last valid byte (0x80 = one valid byte in data[63:56], 0x01 = all eight).
//
// The forwarding header follows the 14-byte MAC header (see the word map
// below): 32-byte nonce I, next-header / length / d, TTL, 32-byte Bloom
// filter. The node derives for each outgoing link a k-hot, m-bit Bloom mask
// from F3(K3, I xor O2[link]) and forwards on the links whose mask is
// contained in the in-packet Bloom filter.
//
// The AES S-box is computed at elaboration time from its definition
// (multiplicative inverse in GF(2^8) followed by the affine map) rather than
// typed in as a table. The Moustique cell map reproduces the numbering of the
// 128 CCSR bits into 96 cells of 1, 2, 4, 8 or 16 bits.
package zf_pkg;

  // ---------------------------------------------------------------- bus
  localparam int DATA_W = 64;
  localparam int CTRL_W = 8;

  typedef struct packed {
    logic [CTRL_W-1:0] ctrl;
    logic [DATA_W-1:0] data;
  } pkt_word_t;

  localparam logic [CTRL_W-1:0] IO_QUEUE_CTRL = 8'hFF;

  // I/O queue module header fields (bit ranges inside data)
  localparam int IOQ_DST_HI = 63, IOQ_DST_LO = 48;
  localparam int IOQ_WLEN_HI = 47, IOQ_WLEN_LO = 32;
  localparam int IOQ_SRC_HI = 31, IOQ_SRC_LO = 16;
  localparam int IOQ_BLEN_HI = 15, IOQ_BLEN_LO = 0;

  // Frame side of the Rx and Tx queues (towards the MAC or the DMA engine)
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              last;
    logic [3:0]        bytes;   // valid bytes in a last word, 1..8
  } frame_word_t;

  // ------------------------------------------------------ node geometry
  localparam int NUM_QUEUES = 8;  // MAC0, CPU0, MAC1, CPU1, ...
  localparam int NUM_LINKS  = 4;  // outgoing Ethernet links, one O2 each
  localparam int BF_M       = 256;   // Bloom filter / mask length m
  localparam int BF_K       = 5;     // bits set per link identifier k
  localparam int IDX_W      = $clog2(BF_M);  // 8 cipher bits per index
  localparam int KEY_BITS   = 256;   // K3 as written by software
  localparam int O2_BITS    = 256;   // one O2 value
  localparam logic [15:0] ZF_ETHERTYPE = 16'hACDC;

  // Word numbers inside the frame (word 0 = first frame word, ctrl 0x00)
  localparam int W_ETHERTYPE = 1;   // bytes 12..13 -> data[31:16]
  localparam int W_NONCE0    = 2;   // bytes 16..47, four words
  localparam int W_TTL       = 6;   // byte 52      -> data[31:24]
  localparam int W_BF0       = 7;   // bytes 56..87, four words
  localparam int W_HDR_LAST  = 10;

  typedef enum logic {CIPHER_AES = 1'b0, CIPHER_MOUSTIQUE = 1'b1} cipher_e;

  // End-of-packet marker for a number of valid bytes (1..8)
  function automatic logic [CTRL_W-1:0] eop_ctrl(input logic [3:0] nbytes);
    return 8'h80 >> (nbytes - 4'd1);
  endfunction

  // Number of valid bytes from a non-zero end-of-packet marker
  function automatic logic [3:0] eop_bytes(input logic [CTRL_W-1:0] ctrl);
    logic [3:0] n;
    n = 4'd8;
    for (int b = 7; b >= 0; b--) if (ctrl[b]) n = 4'(8 - b);
    return n;
  endfunction

  // --------------------------------------------------------- register map
  // Word offsets from the block base address. K3 word 0 holds K3[255:224];
  // O2 of link l, word w sits at O2_OFF + 8*l + w.
  localparam int REG_ADDR_W = 23;
  localparam int REG_DATA_W = 32;
  localparam int REG_SRC_W  = 2;
  localparam int K3_OFF     = 0;
  localparam int O2_OFF     = 8;
  localparam int STATUS_OFF = O2_OFF + 8 * NUM_LINKS;  // read only
  localparam int FWD_CNT_OFF  = STATUS_OFF + 1;        // packets forwarded
  localparam int DROP_CNT_OFF = STATUS_OFF + 2;        // packets dropped
  localparam int REG_WORDS    = STATUS_OFF + 3;

  typedef struct packed {
    logic                  req;
    logic                  ack;
    logic                  rd_wr_l;
    logic [REG_ADDR_W-1:0] addr;
    logic [REG_DATA_W-1:0] data;
    logic [REG_SRC_W-1:0]  src;
  } reg_bus_t;

  // ------------------------------------------------------------------ AES
  typedef logic [255:0][7:0] sbox_t;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // S-box: inverse through exp/log tables of generator 0x03, then affine map
  function automatic sbox_t make_sbox();
    sbox_t s;
    logic [7:0] exp_t [256];
    logic [7:0] log_t [256];
    logic [7:0] p, inv, r;
    p = 8'h01;
    for (int i = 0; i < 256; i++) begin
      exp_t[i] = 8'h00;
      log_t[i] = 8'h00;
    end
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = p;
      log_t[p] = 8'(i);
      p = p ^ xtime(p);
    end
    for (int x = 0; x < 256; x++) begin
      if (x == 0) inv = 8'h00;
      else inv = exp_t[(255 - int'(log_t[x])) % 255];
      r = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]}
              ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      s[x] = r;
    end
    return s;
  endfunction

  localparam sbox_t AES_SBOX = make_sbox();

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {AES_SBOX[w[31:24]], AES_SBOX[w[23:16]],
            AES_SBOX[w[15:8]],  AES_SBOX[w[7:0]]};
  endfunction

  // One column of MixColumns
  function automatic logic [31:0] mix_col(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // ------------------------------------------------------------ Moustique
  // State updating functions (all arithmetic in GF(2))
  function automatic logic g0(input logic a, b, c, d);
    return a ^ b ^ c ^ d;
  endfunction
  function automatic logic g1(input logic a, b, c, d);
    return a ^ b ^ (c & ~d) ^ 1'b1;
  endfunction
  function automatic logic g2(input logic a, b, c, d);
    return (a & ~b) ^ (c & ~d);
  endfunction

  localparam int MQ_CELLS  = 96;
  localparam int MQ_BITS   = 128;
  localparam int MQ_KEY    = 96;   // n_k
  localparam int MQ_MEM    = 105;  // n_m, IV length
  localparam int MQ_S1     = 53;   // stages a1..a5
  localparam int MQ_S6     = 12;
  localparam int MQ_S7     = 3;

  // Number of bits n_j of cell j (cell 0 is the ciphertext input bit)
  function automatic int mq_n(input int j);
    if (j <= 88) return 1;
    if (j <= 92) return 2;
    if (j <= 94) return 4;
    if (j == 95) return 8;
    return 16;
  endfunction

  // Position 1..128 of bit i of cell j in the CCSR; position 0 = input bit
  function automatic int mq_pos(input int j, input int i);
    if (j == 0) return 0;
    if (i == 0) return j;
    if (i == 1) return 96 + (j - 88);
    if (i <= 3) return 104 + (i - 2) * 4 + (j - 92);
    if (i <= 7) return 112 + (i - 4) * 2 + (j - 94);
    return 120 + (i - 7);
  endfunction

  // Function selector 0/1/2, and the v and w cells, for bit i of cell j
  function automatic int mq_fn(input int j, input int i);
    int d;
    if (j == 96 && i > 0) return 2;
    d = j - i;
    if (d % 3 == 1) return 0;
    return 1;
  endfunction
  function automatic int mq_v(input int j, input int i);
    int d;
    d = j - i;
    if (d % 3 == 1) return 2 * (d - 1) / 3;
    if (d % 3 == 2) return j - 4;
    if (d % 6 == 3) return 0;
    return j - 5;
  endfunction
  function automatic int mq_w(input int j, input int i);
    int d;
    d = j - i;
    if (d % 6 == 0) return 0;
    return j - 2;
  endfunction

  typedef struct packed {
    logic [MQ_BITS:1]  q;    // CCSR, positions 1..128
    logic [MQ_S1-1:0]  a1;
    logic [MQ_S1-1:0]  a2;
    logic [MQ_S1-1:0]  a3;
    logic [MQ_S1-1:0]  a4;
    logic [MQ_S1-1:0]  a5;
    logic [MQ_S6-1:0]  a6;
    logic [MQ_S7-1:0]  a7;
  } mq_state_t;

endpackage
