// Blowfish key-search controller with N_CORES parallel cores.
//
// The 32-bit key space is split by its top CORE_BITS bits: core i only
// tries keys {i, cnt}, so with 8 cores core 0 covers 0x00000000-0x1FFFFFFF,
// core 1 0x20000000-0x3FFFFFFF and so on, and no key is tried twice.  For
// each value of the shared counter cnt (starting at key_lo_start):
//   1. all cores run their key set-up together (they share one pi ROM,
//      addressed by core 0, because they step through it in lock-step);
//   2. all cores decrypt the test block cipher_blk;
//   3. cores whose result starts with 0xFFD8 (JPEG start-of-image) are
//      hits.  The lowest-numbered hit core re-encrypts its result and the
//      output is compared with cipher_blk.  A match ends the search, a
//      mismatch drops that hit and the next one is checked; with no hit
//      left cnt is incremented and the cores run again.
// After a match core 0 is set up with the found key, key_found rises and
// core 0 is lent to the data port (d_start/d_in -> d_out/d_valid, decrypt
// only).  If cnt wraps without a match, exhausted rises instead.
//
// The partition, the 0xFFD8 test, the re-encryption check and the final
// set-up of core 0 follow the described search.  Note that re-encrypting a
// block with the key that decrypted it always returns the ciphertext, so
// the check cannot reject a false key: keys that merely happen to produce
// 0xFFD8 are accepted.  Verifying hits in core order is this design's
// choice.  stat_batches counts key batches tried, stat_hits 0xFFD8 hits.
//
// Timing: one batch of N_CORES keys takes about 10180 clock cycles (key
// set-up dominates, see bf_core).
module bf_key_search
  import crack_pkg::*;
#(
  parameter int unsigned N_CORES   = 8,
  parameter int unsigned CORE_BITS = $clog2(N_CORES)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  block_t                cipher_blk,
  input  logic [31-CORE_BITS:0] key_lo_start,
  output logic                  busy,
  output logic                  key_found,
  output logic                  exhausted,
  output word_t                 found_key,
  output logic [31:0]           stat_batches,
  output logic [31:0]           stat_hits,
  // data decryption through core 0 once key_found is high
  output logic                  d_ready,
  input  logic                  d_start,
  input  block_t                d_in,
  output block_t                d_out,
  output logic                  d_valid
);

  typedef enum logic [3:0] {
    K_IDLE, K_INIT_GO, K_INIT_WAIT, K_DEC_GO, K_DEC_WAIT, K_CHECK,
    K_VER_GO, K_VER_WAIT, K_REINIT_GO, K_REINIT_WAIT, K_DONE
  } kstate_t;

  localparam int unsigned LO_W = 32 - CORE_BITS;

  kstate_t              state;
  logic [LO_W-1:0]      cnt;
  block_t               cipher_q;
  logic [N_CORES-1:0]   hits;
  block_t               plain [N_CORES];
  logic [CORE_BITS-1:0] sel;

  // core ports
  logic                 c_init   [N_CORES];
  word_t                c_key    [N_CORES];
  logic                 c_ready  [N_CORES];
  logic [7:0]           c_rom_addr [N_CORES];
  logic                 c_start  [N_CORES];
  logic                 c_dec    [N_CORES];
  block_t               c_in     [N_CORES];
  block_t               c_out    [N_CORES];
  logic                 c_valid  [N_CORES];
  word_t                rom_p, rom_s [4];

  bf_pi_rom u_rom (.clk, .addr(c_rom_addr[0]), .p(rom_p), .s(rom_s));

  for (genvar g = 0; g < N_CORES; g++) begin : g_core
    bf_core u_core (
      .clk, .rst,
      .init_start (c_init[g]),  .key(c_key[g]),   .ready(c_ready[g]),
      .rom_addr   (c_rom_addr[g]), .rom_p, .rom_s,
      .blk_start  (c_start[g]), .blk_decrypt(c_dec[g]), .blk_in(c_in[g]),
      .blk_out    (c_out[g]),   .blk_valid(c_valid[g])
    );
  end

  // lowest set bit of hits
  always_comb begin
    sel = '0;
    for (int i = N_CORES - 1; i >= 0; i--)
      if (hits[i]) sel = CORE_BITS'(i);
  end

  logic all_ready;
  always_comb begin
    all_ready = 1'b1;
    for (int i = 0; i < N_CORES; i++) all_ready &= c_ready[i];
  end

  // drive the cores
  always_comb begin
    for (int i = 0; i < N_CORES; i++) begin
      c_key[i]   = {CORE_BITS'(i), cnt};
      c_init[i]  = (state == K_INIT_GO);
      c_start[i] = (state == K_DEC_GO) || (state == K_VER_GO && sel == CORE_BITS'(i));
      c_dec[i]   = (state != K_VER_GO);
      c_in[i]    = (state == K_VER_GO) ? plain[i] : cipher_q;
    end
    if (state == K_REINIT_GO) begin
      c_key[0]  = found_key;
      c_init[0] = 1'b1;
    end
    if (state == K_DONE) begin
      c_start[0] = d_start;
      c_dec[0]   = 1'b1;
      c_in[0]    = d_in;
    end
  end

  assign busy    = (state != K_IDLE) && (state != K_DONE);
  assign d_ready = (state == K_DONE) && c_ready[0];
  assign d_out   = c_out[0];
  assign d_valid = (state == K_DONE) && c_valid[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= K_IDLE;
      cnt          <= '0;
      cipher_q     <= '0;
      hits         <= '0;
      key_found    <= 1'b0;
      exhausted    <= 1'b0;
      found_key    <= '0;
      stat_batches <= '0;
      stat_hits    <= '0;
    end else begin
      unique case (state)
        K_IDLE, K_DONE: if (start) begin
          cnt       <= key_lo_start;
          cipher_q  <= cipher_blk;
          key_found <= 1'b0;
          exhausted <= 1'b0;
          state     <= K_INIT_GO;
        end
        K_INIT_GO:   state <= K_INIT_WAIT;
        K_INIT_WAIT: if (all_ready) state <= K_DEC_GO;
        K_DEC_GO:    state <= K_DEC_WAIT;
        K_DEC_WAIT:  if (c_valid[0]) begin
          for (int i = 0; i < N_CORES; i++) begin
            plain[i] <= c_out[i];
            hits[i]  <= (c_out[i][63:48] == JPEG_SOI);
          end
          stat_batches <= stat_batches + 32'd1;
          state        <= K_CHECK;
        end
        K_CHECK: begin
          if (hits != '0) begin
            stat_hits <= stat_hits + 32'd1;
            state     <= K_VER_GO;
          end else if (cnt == '1) begin
            exhausted <= 1'b1;
            state     <= K_IDLE;
          end else begin
            cnt   <= cnt + LO_W'(1);
            state <= K_INIT_GO;
          end
        end
        K_VER_GO:   state <= K_VER_WAIT;
        K_VER_WAIT: if (c_valid[sel]) begin
          if (c_out[sel] == cipher_q) begin
            found_key <= {sel, cnt};
            state     <= K_REINIT_GO;
          end else begin
            hits[sel] <= 1'b0;
            state     <= K_CHECK;
          end
        end
        K_REINIT_GO:   state <= K_REINIT_WAIT;
        K_REINIT_WAIT: if (c_ready[0]) begin
          key_found <= 1'b1;
          state     <= K_DONE;
        end
        default: state <= K_IDLE;
      endcase
    end
  end

  // All cores step through the shared ROM together during a batch set-up.
  for (genvar g = 1; g < N_CORES; g++) begin : g_chk
    a_lockstep: assert property (@(posedge clk) disable iff (rst)
      state == K_INIT_WAIT |-> c_rom_addr[g] == c_rom_addr[0]);
  end

endmodule
