// Shared constants and types for the Blowfish key-search cracker.
//
// Blowfish: 64-bit blocks split in two 32-bit halves, an 18-word P-array
// and four 256-entry S-boxes of 32-bit words.  The search looks for a
// decrypted first block whose two top bytes are the JPEG start-of-image
// marker 0xFFD8.  Key bytes enter the P-array least significant byte
// first (see bf_key_word).
package crack_pkg;

  localparam int unsigned BF_ROUNDS   = 16;
  localparam int unsigned BF_P_WORDS  = 18;
  localparam int unsigned BF_S_WORDS  = 256;
  localparam int unsigned BF_ROM_WORDS = BF_P_WORDS + 4 * BF_S_WORDS;  // 1042

  localparam logic [15:0] JPEG_SOI = 16'hFFD8;

  typedef logic [31:0] word_t;
  typedef logic [63:0] block_t;

  // 32-bit key as the word XORed into every P entry (4-byte key, bytes
  // taken least significant first, repeated).
  function automatic word_t bf_key_word(input word_t key);
    return {key[7:0], key[15:8], key[23:16], key[31:24]};
  endfunction

  // The F function of fig. "F-box": ((S0 + S1) ^ S2) + S3, modulo 2^32.
  function automatic word_t bf_f(input word_t s0, input word_t s1, input word_t s2, input word_t s3);
    return ((s0 + s1) ^ s2) + s3;
  endfunction

endpackage
