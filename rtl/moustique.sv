// moustique -- per-link F3 engine built on the Moustique stream cipher.
//
// What it does: after new keys have been written (start_initialization) it
// feeds the 105 initialization-vector bits into the cipher, one per clock, and
// then holds. For every packet (start_moustique) it decrypts OUT_BITS bits of
// cipher_in = (I xor O2) one bit per clock, most significant bit first:
// m = c ^ z, with c also shifted into the cipher. The OUT_BITS decrypted bits
// are k = 5 Bloom-filter indices of 8 bits each (40 bits for m = 256).
//
// Timing: with start_moustique high in cycle 0 the first bit is consumed at
// the end of cycle 0 and decrypted_data_ready is high for one cycle in cycle
// OUT_BITS (40), with decrypted_data valid from then until the next run.
// Initialization takes MQ_MEM (105) clocks plus one to store the state.
//
// Follows the document: 105-cycle IV initialization on new key material, the
// hold state, bit-serial 40-cycle decryption, the start_initialization /
// start_moustique / decrypted_data_ready signals. Own choices: the IV value
// (parameter IV, all zeros by default), restarting every packet from the state
// stored at the end of initialization, and accepting a start that arrives
// while the IV is still being fed (it is remembered and run afterwards). If no
// key was ever loaded the run starts from the reset state.
module moustique
  import zf_pkg::*;
#(
  parameter int                  OUT_BITS = BF_K * IDX_W,
  parameter logic [MQ_MEM-1:0]   IV       = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [MQ_KEY-1:0]   key,
  input  logic                start_initialization,
  input  logic                start_moustique,
  input  logic [OUT_BITS-1:0] cipher_in,
  output logic [OUT_BITS-1:0] decrypted_data,
  output logic                decrypted_data_ready,
  output logic                initialized
);

  typedef enum logic [2:0] {S_UNKEYED, S_INIT, S_SAVE, S_HOLD, S_RUN} state_e;
  state_e state;

  logic [$clog2(MQ_MEM+1)-1:0] cnt;
  logic [OUT_BITS-1:0]         sh;        // bits still to be decrypted
  logic                        pend;      // start seen while initializing
  logic [OUT_BITS-1:0]         pend_data;

  logic en, c_bit, z, save, from_saved, go;
  logic [OUT_BITS-1:0] go_data;

  // a run starts from the stored state, now or when initialization ends
  assign go      = (state == S_HOLD || state == S_UNKEYED) && (start_moustique || pend);
  assign go_data = start_moustique ? cipher_in : pend_data;

  always_comb begin
    en         = 1'b0;
    c_bit      = 1'b0;
    save       = 1'b0;
    from_saved = 1'b0;
    case (state)
      S_INIT: begin
        en    = 1'b1;
        c_bit = IV[MQ_MEM-1-int'(cnt)];
      end
      S_SAVE: save = 1'b1;
      S_RUN: begin
        en    = 1'b1;
        c_bit = sh[OUT_BITS-1];
      end
      default: ;
    endcase
    if (go && !start_initialization) begin
      en         = 1'b1;
      from_saved = 1'b1;
      c_bit      = go_data[OUT_BITS-1];
    end
  end

  moustique_core u_core (
    .clk, .rst_n, .en, .c_in(c_bit), .key, .save, .from_saved, .z
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state                <= S_UNKEYED;
      cnt                  <= '0;
      sh                   <= '0;
      pend                 <= 1'b0;
      pend_data            <= '0;
      decrypted_data       <= '0;
      decrypted_data_ready <= 1'b0;
      initialized          <= 1'b0;
    end else begin
      decrypted_data_ready <= 1'b0;
      if (start_moustique && !go) begin
        pend      <= 1'b1;
        pend_data <= cipher_in;
      end
      if (start_initialization) begin
        state       <= S_INIT;
        cnt         <= '0;
        initialized <= 1'b0;
      end else begin
        case (state)
          S_INIT: begin
            cnt <= cnt + 1'b1;
            if (int'(cnt) == MQ_MEM - 1) state <= S_SAVE;
          end
          S_SAVE: begin
            state       <= S_HOLD;
            initialized <= 1'b1;
          end
          S_RUN: begin
            decrypted_data <= {decrypted_data[OUT_BITS-2:0], c_bit ^ z};
            sh             <= {sh[OUT_BITS-2:0], 1'b0};
            cnt            <= cnt + 1'b1;
            if (int'(cnt) == OUT_BITS - 1) begin
              state                <= S_HOLD;
              decrypted_data_ready <= 1'b1;
            end
          end
          default: ;
        endcase
        if (go) begin
          pend           <= 1'b0;
          state          <= S_RUN;
          cnt            <= 1;
          sh             <= {go_data[OUT_BITS-2:0], 1'b0};
          decrypted_data <= {decrypted_data[OUT_BITS-2:0], c_bit ^ z};
        end
      end
    end
  end

endmodule
