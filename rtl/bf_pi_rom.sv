// Blowfish initial-value ROM, shared by all key-search cores.
//
// Holds the 1042 words that every Blowfish key set-up starts from: the
// 18-word P-array followed by S-boxes 0..3 (256 words each).  Word n is
// bits 32n+1 .. 32n+32 of the fractional part of pi in binary, i.e. the
// hex digits of pi - 3 taken eight at a time (P[0] = 0x243F6A88).  The
// table is read from rtl/bf_pi_init.hex in that order.
//
// Interface: one index addr (0..255) reads, one cycle later, P[addr] on p
// (valid for addr < 18, zero otherwise) and S0..S3[addr] on s[0..3] - the
// five ROMs of the design, read in parallel so that a core can fill its P
// registers and all four S-box RAMs in 256 cycles.  Synchronous read, no
// reset: the outputs are registers that suit block ROM.
module bf_pi_rom
  import crack_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] addr,
  output word_t      p,
  output word_t      s [4]
);

  word_t rom [BF_ROM_WORDS];

  initial $readmemh("rtl/bf_pi_init.hex", rom);

  always_ff @(posedge clk) begin
    p <= (addr < 8'(BF_P_WORDS)) ? rom[11'(addr)] : '0;
    for (int i = 0; i < 4; i++)
      s[i] <= rom[BF_P_WORDS + i * BF_S_WORDS + int'(addr)];
  end

endmodule
