// moustique_core -- the cipher function of the Moustique self-synchronizing
// stream cipher: a conditional complementing shift register (CCSR) followed by
// seven pipeline stages, one ciphertext bit in and one keystream bit out.
//
// How it works: the CCSR holds 128 bits grouped into 96 cells (cells 1..88
// one bit, 89..92 two, 93..94 four, 95 eight, 96 sixteen). On every enabled
// clock each bit of cell j is recomputed from cell j-1, key bit k[j-1] and two
// earlier cells v and w through one of the nonlinear functions g0/g1 (g2 for
// the upper 15 bits of cell 96); cell 0 is the ciphertext bit c_in. Stage a1
// (53 bits) is computed from the CCSR, a2..a5 (53 bits) each from the stage
// before, a6 (12 bits) and a7 (3 bits) compress the result. The keystream bit
// is z = a7[0] ^ a7[1] ^ a7[2]; indices that fall outside a stage read 0.
// All functions, cell sizes, the v/w/function selection table and the stage
// equations follow the published cipher description.
//
// Interface and timing: z is combinational from the registered state, so a
// decryptor computes m = c_in ^ z and an encryptor c_in = m ^ z in the same
// cycle, and the state advances on the clock edge when en is high. save copies
// the current state into a snapshot register; with from_saved high the cycle
// works from the snapshot instead of the live state (z and next state). The
// snapshot lets every packet start from the state reached after the IV was
// fed, which keeps the link identifiers a function of the packet alone; that
// save/restore mechanism is this design's own choice. Reset clears both.
module moustique_core
  import zf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              c_in,
  input  logic [MQ_KEY-1:0] key,
  input  logic              save,
  input  logic              from_saved,
  output logic              z
);

  mq_state_t st, saved, cur, nxt;
  logic [MQ_BITS:0]  qx;   // position 0 is the input bit, 1..128 the CCSR
  logic [MQ_BITS:1]  qn;   // next CCSR
  // stages padded with zeros: indices past the end of a stage read 0
  logic [MQ_S1+2:0]  a1x, a2x, a3x, a4x;

  assign cur = from_saved ? saved : st;
  assign qx  = {cur.q, c_in};
  assign z   = cur.a7[0] ^ cur.a7[1] ^ cur.a7[2];
  assign a1x = {3'b000, cur.a1};
  assign a2x = {3'b000, cur.a2};
  assign a3x = {3'b000, cur.a3};
  assign a4x = {3'b000, cur.a4};

  // CCSR: every cell position, its inputs and its function are fixed at
  // elaboration
  for (genvar j = 1; j <= MQ_CELLS; j++) begin : g_cell
    for (genvar i = 0; i < mq_n(j); i++) begin : g_bit
      localparam int P = mq_pos(j, i);
      if (j == MQ_CELLS && i > 0) begin : g_top
        localparam int PA = mq_pos(95, i % 8);
        localparam int PB = mq_pos(95 - i, 0);
        localparam int PC = mq_pos(94, i % 4);
        localparam int PD = mq_pos(94 - i, i % mq_n(94 - i));
        assign qn[P] = g2(qx[PA], qx[PB], qx[PC], qx[PD]);
      end else if (j <= 2) begin : g_low
        localparam int PA = mq_pos(j - 1, i % mq_n(j - 1));
        if (mq_fn(j, i) == 0) begin : g_f0
          assign qn[P] = g0(qx[PA], key[j-1], 1'b0, 1'b0);
        end else begin : g_f1
          assign qn[P] = g1(qx[PA], key[j-1], 1'b0, 1'b0);
        end
      end else begin : g_std
        localparam int V  = mq_v(j, i);
        localparam int W  = mq_w(j, i);
        localparam int PA = mq_pos(j - 1, i % mq_n(j - 1));
        localparam int PC = mq_pos(V, i % mq_n(V));
        localparam int PD = mq_pos(W, i % mq_n(W));
        if (mq_fn(j, i) == 0) begin : g_f0
          assign qn[P] = g0(qx[PA], key[j-1], qx[PC], qx[PD]);
        end else begin : g_f1
          assign qn[P] = g1(qx[PA], key[j-1], qx[PC], qx[PD]);
        end
      end
    end
  end

  always_comb begin
    nxt   = '0;
    nxt.q = qn;
    for (int i = 0; i < MQ_S1; i++) begin
      nxt.a1[(4*i) % MQ_S1] = g1(cur.q[128 - i], cur.q[i + 18], cur.q[113 - i], cur.q[i + 1]);
      nxt.a2[(4*i) % MQ_S1] = g1(a1x[i], a1x[i + 3], a1x[i + 1], a1x[i + 2]);
      nxt.a3[(4*i) % MQ_S1] = g1(a2x[i], a2x[i + 3], a2x[i + 1], a2x[i + 2]);
      nxt.a4[(4*i) % MQ_S1] = g1(a3x[i], a3x[i + 3], a3x[i + 1], a3x[i + 2]);
      nxt.a5[(4*i) % MQ_S1] = g1(a4x[i], a4x[i + 3], a4x[i + 1], a4x[i + 2]);
    end
    for (int i = 0; i < MQ_S6; i++)
      nxt.a6[i] = g1(cur.a5[4*i], cur.a5[4*i+3], cur.a5[4*i+1], cur.a5[4*i+2]);
    for (int i = 0; i < MQ_S7; i++)
      nxt.a7[i] = g0(cur.a6[4*i], cur.a6[4*i+1], cur.a6[4*i+2], cur.a6[4*i+3]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= '0;
      saved <= '0;
    end else begin
      if (en)   st    <= nxt;
      if (save) saved <= st;
    end
  end

endmodule
