// Self-checking testbench for bf_core (with the shared pi ROM).
//
// Known answers: key 0 encrypts 0 to 4EF997456198DD78 (the published
// all-zero Blowfish vector); key 0x67AEF891 encrypts FFD8334455667788 to
// 55F498A5C51B16AB and decrypts it back; key 0x60003231 decrypts that
// ciphertext to FFD88BAF2AD019C8, a false 0xFFD8 hit; key 0xDEADBEEF
// encrypts 0123456789ABCDEF to 473EC792A77E99D3.  Also checks the key
// set-up latency (10157 cycles) and the block latency (18 cycles).
module tb_bf_core;
  import crack_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic       init_start = 1'b0, blk_start = 1'b0, blk_decrypt = 1'b0, ready, blk_valid;
  word_t      key = '0;
  block_t     blk_in = '0, blk_out;
  logic [7:0] rom_addr;
  word_t      rom_p, rom_s [4];

  int checks = 0, failures = 0;

  bf_pi_rom u_rom (.clk, .addr(rom_addr), .p(rom_p), .s(rom_s));
  bf_core   dut (.clk, .rst, .init_start, .key, .ready, .rom_addr, .rom_p, .rom_s,
                 .blk_start, .blk_decrypt, .blk_in, .blk_out, .blk_valid);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_init(input word_t k);
    int n = 0;
    @(negedge clk); key = k; init_start = 1'b1;
    @(negedge clk); init_start = 1'b0; n = 1;
    while (!ready) begin @(negedge clk); n++; end
    check($sformatf("set-up cycles key %h", k), 64'(n), 64'd10157);
  endtask

  task automatic do_blk(input logic dec, input block_t din, input block_t exp);
    int n = 0;
    @(negedge clk); blk_in = din; blk_decrypt = dec; blk_start = 1'b1;
    @(negedge clk); blk_start = 1'b0; n = 1;
    while (!blk_valid) begin @(negedge clk); n++; end
    check($sformatf("%s %h", dec ? "decrypt" : "encrypt", din), blk_out, exp);
    check("block cycles", 64'(n), 64'd18);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    do_init(32'h0000_0000);
    do_blk(1'b0, 64'h0, 64'h4EF997456198DD78);
    do_blk(1'b1, 64'h4EF997456198DD78, 64'h0);
    do_init(32'h67AE_F891);
    do_blk(1'b0, 64'hFFD8334455667788, 64'h55F498A5C51B16AB);
    do_blk(1'b1, 64'h55F498A5C51B16AB, 64'hFFD8334455667788);
    do_init(32'h6000_3231);
    do_blk(1'b1, 64'h55F498A5C51B16AB, 64'hFFD88BAF2AD019C8);
    do_init(32'hDEAD_BEEF);
    do_blk(1'b0, 64'h0123456789ABCDEF, 64'h473EC792A77E99D3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
