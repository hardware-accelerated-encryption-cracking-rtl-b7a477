// One Blowfish core with on-chip key set-up, for brute-force key search.
//
// Key set-up (init_start with a 32-bit key):
//   COPY   256 ROM reads fill the four S-box RAMs and the 18 P registers
//          from the shared pi ROM (bf_pi_rom), each P word XORed with the
//          key on the way in.  The key's bytes are used least significant
//          first: P[i] ^= {key[7:0], key[15:8], key[23:16], key[31:24]}.
//   SETUP  the standard Blowfish mixing: starting from an all-zero block,
//          521 chained encryptions whose outputs overwrite P[0..17] and
//          then S0..S3, two words per encryption.
// After set-up ready is high and the core encrypts or decrypts 64-bit
// blocks (blk_start, blk_decrypt, blk_in -> blk_out with a one-cycle
// blk_valid pulse).  The left half is blk_in[63:32].
//
// Datapath: the 16-round Feistel network is computed one round per clock.
// The S-boxes are synchronous RAMs, so the byte addresses for round i+1 are
// formed in the same cycle that round i's F value comes out of the RAMs
// (F -> XOR -> XOR with P -> RAM address is the critical path).  Counting
// from the clock edge that accepts the request, blk_valid rises 18 edges
// later (accept, 1 start cycle, 16 rounds) and ready after 10157 edges
// (accept, 257 copy cycles, 521 set-up encryptions of 19 cycles each).  Decryption walks the P-array
// backwards through the same network.
//
// The round structure, the F function, the P-array/S-box sizes, the pi
// initialisation and the 4 x 256x32 RAMs per core follow the Blowfish
// description; the one-round-per-cycle schedule and the handshake are this
// design's own.  Requests are accepted only while ready (or, for
// init_start, while idle or ready); others are ignored.
module bf_core
  import crack_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // key set-up
  input  logic       init_start,
  input  word_t      key,
  output logic       ready,
  // shared pi ROM
  output logic [7:0] rom_addr,
  input  word_t      rom_p,
  input  word_t      rom_s [4],
  // block port
  input  logic       blk_start,
  input  logic       blk_decrypt,
  input  block_t     blk_in,
  output block_t     blk_out,
  output logic       blk_valid
);

  typedef enum logic [2:0] {S_IDLE, S_COPY, S_ENC_START, S_ROUND, S_WR_L, S_WR_R, S_READY} state_t;

  state_t       state;
  word_t        p_arr [BF_P_WORDS];
  word_t        key_w;
  word_t        l_q, r_q;
  logic [3:0]   rnd;
  logic         dec_q;
  logic         setup_q;     // running the key set-up rather than a user block
  logic [8:0]   copy_cnt;    // 0..256
  logic [10:0]  widx;        // next table word to overwrite during set-up

  // S-box RAM ports
  logic [7:0]   sb_addr [4];
  logic         sb_we   [4];
  word_t        sb_wdata[4];
  word_t        sb_rdata[4];
  word_t        f_val;

  for (genvar g = 0; g < 4; g++) begin : g_sbox
    bf_sbox_ram u_ram (.clk, .addr(sb_addr[g]), .we(sb_we[g]), .wdata(sb_wdata[g]), .rdata(sb_rdata[g]));
  end

  bf_f_func u_f (.s(sb_rdata), .f(f_val));

  // P index used by round r (and by the final whitening) for either direction
  function automatic logic [4:0] pidx(input logic dec, input int unsigned r);
    return dec ? 5'(17 - r) : 5'(r);
  endfunction

  // combinational round datapath
  word_t       x_start;      // L ^ P[first] at ENC_START
  word_t       new_l;        // R ^ F(L)
  word_t       x_next;       // new_l ^ P[next]
  word_t       out_l, out_r;
  logic [9:0]  s_off;       // S-box word being written: (widx or widx+1) - 18
  always_comb begin
    x_start = l_q ^ p_arr[pidx(dec_q, 0)];
    new_l   = r_q ^ f_val;
    x_next  = new_l ^ p_arr[pidx(dec_q, 32'(rnd) + 1)];
    out_l   = l_q   ^ p_arr[pidx(dec_q, 17)];
    out_r   = new_l ^ p_arr[pidx(dec_q, 16)];
    s_off   = 10'(widx - 11'(BF_P_WORDS) + 11'(state == S_WR_R));
  end

  // S-box RAM address / write control
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      sb_addr[i]  = '0;
      sb_we[i]    = 1'b0;
      sb_wdata[i] = rom_s[i];
    end
    unique case (state)
      S_COPY: for (int i = 0; i < 4; i++) begin
        sb_addr[i] = 8'(copy_cnt - 9'd1);
        sb_we[i]   = (copy_cnt != 9'd0);
      end
      S_ENC_START: for (int i = 0; i < 4; i++) sb_addr[i] = x_start[31 - 8*i -: 8];
      S_ROUND:     for (int i = 0; i < 4; i++) sb_addr[i] = x_next[31 - 8*i -: 8];
      S_WR_L, S_WR_R: if (widx >= 11'(BF_P_WORDS)) begin
        for (int i = 0; i < 4; i++) begin
          sb_addr[i]  = s_off[7:0];
          sb_wdata[i] = (state == S_WR_L) ? l_q : r_q;
          sb_we[i]    = (s_off[9:8] == 2'(i));
        end
      end
      default: ;
    endcase
  end

  assign rom_addr = copy_cnt[7:0];
  assign ready    = (state == S_READY);

  always_ff @(posedge clk) begin
    blk_valid <= 1'b0;
    if (rst) begin
      state    <= S_IDLE;
      copy_cnt <= '0;
      widx     <= '0;
      rnd      <= '0;
      dec_q    <= 1'b0;
      setup_q  <= 1'b0;
      l_q      <= '0;
      r_q      <= '0;
      key_w    <= '0;
      blk_out  <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_READY: begin
          if (init_start) begin
            state    <= S_COPY;
            key_w    <= bf_key_word(key);
            copy_cnt <= '0;
          end else if (blk_start && state == S_READY) begin
            state   <= S_ENC_START;
            setup_q <= 1'b0;
            dec_q   <= blk_decrypt;
            l_q     <= blk_in[63:32];
            r_q     <= blk_in[31:0];
          end
        end
        S_COPY: begin
          // ROM data for index copy_cnt-1 is on rom_p / rom_s now
          if (copy_cnt != 9'd0 && copy_cnt <= 9'(BF_P_WORDS))
            p_arr[5'(copy_cnt - 9'd1)] <= rom_p ^ key_w;
          copy_cnt <= copy_cnt + 9'd1;
          if (copy_cnt == 9'(BF_S_WORDS)) begin
            state   <= S_ENC_START;
            setup_q <= 1'b1;
            dec_q   <= 1'b0;
            widx    <= '0;
            l_q     <= '0;
            r_q     <= '0;
          end
        end
        S_ENC_START: begin
          l_q   <= x_start;
          rnd   <= '0;
          state <= S_ROUND;
        end
        S_ROUND: begin
          if (rnd != 4'(BF_ROUNDS - 1)) begin
            l_q <= x_next;
            r_q <= l_q;
            rnd <= rnd + 4'd1;
          end else begin
            l_q <= out_l;
            r_q <= out_r;
            if (setup_q) begin
              state <= S_WR_L;
            end else begin
              blk_out   <= {out_l, out_r};
              blk_valid <= 1'b1;
              state     <= S_READY;
            end
          end
        end
        S_WR_L: begin
          if (widx < 11'(BF_P_WORDS)) p_arr[5'(widx)] <= l_q;
          state <= S_WR_R;
        end
        S_WR_R: begin
          if (widx < 11'(BF_P_WORDS)) p_arr[5'(widx + 11'd1)] <= r_q;
          widx <= widx + 11'd2;
          state <= (widx == 11'(BF_ROM_WORDS - 2)) ? S_READY : S_ENC_START;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
