// 256 x 32-bit single-port RAM holding one Blowfish S-box.
//
// One address serves both the write and the synchronous read: when we is
// high, wdata is stored at addr; rdata always returns the word that was
// at addr before the clock edge (read-first), one cycle after addr is
// presented.  This matches a block RAM used in read-first mode.  No reset:
// the contents are loaded by the key set-up of bf_core before any read.
module bf_sbox_ram
  import crack_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] addr,
  input  logic       we,
  input  word_t      wdata,
  output word_t      rdata
);

  word_t mem [BF_S_WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
