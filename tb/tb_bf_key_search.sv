// Self-checking testbench for bf_key_search with 8 cores.
//
// Ciphertext 55F498A5C51B16AB is FFD8334455667788 under key 0x67AEF891.
//  run 1: counter starts at 0x07AEF890, so batch 2 contains the key
//         (core 3); expect key 0x67AEF891 after 2 batches and 1 hit,
//         then decrypt through core 0.
//  run 2: counter starts at 0x3230: batch 2 gives a false hit on key
//         0x60003231 (decrypts to FFD88BAF2AD019C8), which the
//         re-encryption check accepts.
//  run 3: counter starts at 0x1FFFFFFF, the last value; none of the 8
//         keys gives 0xFFD8, so the search ends exhausted.
// Expected values come from a separate Blowfish model.
module tb_bf_key_search;
  import crack_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        start = 1'b0, busy, key_found, exhausted, d_ready, d_start = 1'b0, d_valid;
  block_t      cipher_blk = 64'h55F498A5C51B16AB, d_in = '0, d_out;
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

  task automatic run(input logic [28:0] lo);
    @(negedge clk); key_lo_start = lo; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!key_found && !exhausted) @(negedge clk);
  endtask

  task automatic decrypt(input block_t din, input block_t exp);
    @(negedge clk); d_in = din; d_start = 1'b1;
    @(negedge clk); d_start = 1'b0;
    while (!d_valid) @(negedge clk);
    check("core 0 data decrypt", d_out, exp);
  endtask

  logic [31:0] b0, h0;
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(29'h07AEF890);
    check("run1 found", {63'd0, key_found}, 64'd1);
    check("run1 key", 64'(found_key), 64'h67AEF891);
    check("run1 batches", 64'(stat_batches), 64'd2);
    check("run1 hits", 64'(stat_hits), 64'd1);
    check("run1 d_ready", {63'd0, d_ready}, 64'd1);
    decrypt(64'h55F498A5C51B16AB, 64'hFFD8334455667788);
    b0 = stat_batches; h0 = stat_hits;
    run(29'h3230);
    check("run2 found", {63'd0, key_found}, 64'd1);
    check("run2 false key", 64'(found_key), 64'h60003231);
    check("run2 batches", 64'(stat_batches - b0), 64'd2);
    check("run2 hits", 64'(stat_hits - h0), 64'd1);
    decrypt(64'h55F498A5C51B16AB, 64'hFFD88BAF2AD019C8);
    b0 = stat_batches;
    run(29'h1FFFFFFF);
    check("run3 exhausted", {63'd0, exhausted}, 64'd1);
    check("run3 not found", {63'd0, key_found}, 64'd0);
    check("run3 batches", 64'(stat_batches - b0), 64'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
