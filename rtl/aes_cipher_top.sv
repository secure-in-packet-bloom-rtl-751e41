// aes_cipher_top -- iterative AES-128 encryption, one round per clock, used as
// the per-link F3 function (key K3, plaintext I xor O2).
//
// How it works: the 16-byte state is a 4x4 byte matrix, filled column by
// column from text_in[127:0] (byte 0 = text_in[127:120]). The load cycle
// performs the initial AddRoundKey; each of the next ten clocks applies
// SubBytes, ShiftRows, MixColumns (left out in round 10) and AddRoundKey with
// a round key expanded on the fly from the previous one; a final clock
// registers the result. The S-box comes from zf_pkg, computed from its
// definition.
//
// Interface and timing: pulse ld for one cycle with key and text_in valid
// (cycle 0). done is high for exactly one cycle, in cycle 12, with text_out
// valid from then until the next result: 1 clock of initial key addition,
// 10 clocks of rounds and 1 output clock, the 12-cycle latency the forwarding
// node was measured with. A new ld may be given once done has been seen (an
// ld during a run restarts it). The round structure and latency follow the
// document; the on-the-fly key schedule and the byte ordering are the
// standard ones.
module aes_cipher_top
  import zf_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  output logic [127:0] text_out,
  output logic         done,
  output logic         busy
);

  logic [127:0] state, rkey;
  logic [7:0]   rcon;
  logic [3:0]   round;     // 1..10 while rounds run, 11 = output clock

  logic [127:0] nkey, sb, sr, mc, nstate;

  // next round key
  always_comb begin
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = rkey;
    t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    nkey = {w0, w1, w2, w3};
  end

  // round function; byte b of the state is state[127-8b -: 8], row b%4,
  // column b/4
  always_comb begin
    for (int b = 0; b < 16; b++) sb[127-8*b -: 8] = AES_SBOX[state[127-8*b -: 8]];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[127-8*(4*c+r) -: 8] = sb[127-8*(4*((c+r)%4)+r) -: 8];
    for (int c = 0; c < 4; c++) mc[127-32*c -: 32] = mix_col(sr[127-32*c -: 32]);
    nstate = ((round == 4'd10) ? sr : mc) ^ nkey;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= '0;
      rkey     <= '0;
      rcon     <= 8'h01;
      round    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      text_out <= '0;
    end else begin
      done <= 1'b0;
      if (ld) begin
        state <= text_in ^ key;
        rkey  <= key;
        rcon  <= 8'h01;
        round <= 4'd1;
        busy  <= 1'b1;
      end else if (busy) begin
        if (round <= 4'd10) begin
          state <= nstate;
          rkey  <= nkey;
          rcon  <= xtime(rcon);
          round <= round + 4'd1;
        end else begin
          text_out <= state;
          done     <= 1'b1;
          busy     <= 1'b0;
          round    <= '0;
        end
      end
    end
  end

endmodule
