// Workload testbench: the seven false keys for the example ciphertext.
//
// Ciphertext 55F498A5C51B16AB (FFD8334455667788 under key 0x67AEF891)
// also decrypts to a block starting 0xFFD8 under keys 0x00004BDF,
// 0x6000AEAE, 0x8000640E, 0x40005010, 0x60003231, 0xC000A891 and
// 0xE000359F.  For each, the 8-core search is started with the counter at
// the key's low 29 bits; it must stop after that one batch and report the
// false key (the only hit in that batch), and core 0 must then decrypt the
// ciphertext to a block starting 0xFFD8 that is not the true plaintext.
module tb_false_keys;
  import crack_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        start = 1'b0, busy, key_found, exhausted, d_ready, d_start = 1'b0, d_valid;
  block_t      cipher_blk = 64'h55F498A5C51B16AB, d_in = 64'h55F498A5C51B16AB, d_out;
  logic [28:0] key_lo_start = '0;
  word_t       found_key;
  logic [31:0] stat_batches, stat_hits;

  int checks = 0, failures = 0;

  bf_key_search dut (.clk, .rst, .start, .cipher_blk, .key_lo_start, .busy, .key_found,
                     .exhausted, .found_key, .stat_batches, .stat_hits,
                     .d_ready, .d_start, .d_in, .d_out, .d_valid);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  word_t keys [7] = '{32'h00004BDF, 32'h6000AEAE, 32'h8000640E, 32'h40005010,
                      32'h60003231, 32'hC000A891, 32'hE000359F};

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (keys[i]) begin
      automatic logic [31:0] b0 = stat_batches;
      @(negedge clk); key_lo_start = keys[i][28:0]; start = 1'b1;
      @(negedge clk); start = 1'b0;
      while (!key_found && !exhausted) @(negedge clk);
      check($sformatf("key %h found", keys[i]), 64'(found_key), 64'(keys[i]));
      check($sformatf("key %h one batch", keys[i]), 64'(stat_batches - b0), 64'd1);
      @(negedge clk); d_start = 1'b1;
      @(negedge clk); d_start = 1'b0;
      while (!d_valid) @(negedge clk);
      check($sformatf("key %h gives FFD8", keys[i]), 64'(d_out[63:48]), 64'hFFD8);
      check($sformatf("key %h not the plaintext", keys[i]), 64'(d_out != 64'hFFD8334455667788), 64'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
