// End-to-end testbench for bf_crack_top at its default size (8 cores),
// with a behavioural DDR2 controller model on a 200 MHz clock and a host
// model on the 125 MHz LocalLink port.
//
// The test image is 1480 bytes starting FF D8 33 44 55 66 77 88.  It is
// encrypted here (ECB) with key 0x67AEF891 by a behavioural Blowfish model
// written independently of the RTL (same initial table), and sent as a
// 1472-byte and an 8-byte UDP payload, then an empty payload (end of
// image).
//  image A: search from counter 0x07AEF890 -> key 0x67AEF891 in batch 2;
//           the reply payloads (1024 + 456 bytes) must equal the image.
//  image B: same data, search from 0x3230 -> the false key 0x60003231 is
//           accepted; the reply must equal the data decrypted with that
//           key (starts FF D8, differs from the image).
//  image C: 16 bytes, search from 0x1FFFFFFF -> exhausted, no reply.
// Each reply frame's header is checked (addresses swapped, lengths).  The
// mechanisms the design has - key batches, 0xFFD8 hits, false-key
// acceptance, exhaustion, masked partial bursts, discarded memory words,
// memory back-pressure, transmit back-pressure, multi-packet replies -
// are counted and each must occur.
module tb_bf_crack_top;
  import crack_pkg::*;

  logic clk = 1'b0, mem_clk = 1'b0, rst = 1'b1, mem_rst = 1'b1;
  always #4 clk = ~clk;
  always #2.5 mem_clk = ~mem_clk;

  logic [7:0]   rx_data = '0, tx_data;
  logic         rx_sof_n = 1, rx_eof_n = 1, rx_src_rdy_n = 1, tx_dst_rdy_n = 1;
  logic         tx_sof_n, tx_eof_n, tx_src_rdy_n;
  logic         phy_init_done, app_af_wren, app_af_afull, app_wdf_wren, app_wdf_afull, rd_data_valid;
  logic [2:0]   app_af_cmd;
  logic [30:0]  app_af_addr, mem_last_addr;
  logic [127:0] app_wdf_data, rd_data_fifo_out;
  logic [15:0]  app_wdf_mask_data;
  logic [28:0]  key_lo_start = '0;
  logic         search_busy, key_found, search_failed;
  word_t        found_key;
  logic [31:0]  image_bytes, images_done, tx_packets, rx_dropped, stat_batches, stat_hits;

  int checks = 0, failures = 0;

  bf_crack_top dut (.*);
  ddr2_mig_model mig (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- behavioural Blowfish ----------------
  word_t pi_tab [BF_ROM_WORDS];
  word_t rp [18];
  word_t rs [4][256];
  initial $readmemh("rtl/bf_pi_init.hex", pi_tab);

  function automatic word_t rf(input word_t x);
    return ((rs[0][x[31:24]] + rs[1][x[23:16]]) ^ rs[2][x[15:8]]) + rs[3][x[7:0]];
  endfunction
  function automatic block_t renc(input block_t b);
    word_t l = b[63:32], r = b[31:0], t;
    for (int i = 0; i < 16; i++) begin l ^= rp[i]; r ^= rf(l); t = l; l = r; r = t; end
    t = l; l = r; r = t;
    r ^= rp[16]; l ^= rp[17];
    return {l, r};
  endfunction
  function automatic block_t rdec(input block_t b);
    word_t l = b[63:32], r = b[31:0], t;
    for (int i = 17; i > 1; i--) begin l ^= rp[i]; r ^= rf(l); t = l; l = r; r = t; end
    t = l; l = r; r = t;
    r ^= rp[1]; l ^= rp[0];
    return {l, r};
  endfunction
  task automatic rkey(input word_t key);
    block_t b = '0;
    word_t kw = {key[7:0], key[15:8], key[23:16], key[31:24]};
    for (int i = 0; i < 18; i++) rp[i] = pi_tab[i] ^ kw;
    for (int s = 0; s < 4; s++) for (int i = 0; i < 256; i++) rs[s][i] = pi_tab[18 + 256*s + i];
    for (int i = 0; i < 18; i += 2) begin b = renc(b); rp[i] = b[63:32]; rp[i+1] = b[31:0]; end
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 256; i += 2) begin b = renc(b); rs[s][i] = b[63:32]; rs[s][i+1] = b[31:0]; end
  endtask

  // ---------------- host: send ----------------
  byte unsigned hdr [42] = '{8'hDA, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06,
                             8'h5A, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h08, 8'h00,
                             8'h45, 8'h00, 8'h00, 8'h2E, 8'h00, 8'h01, 8'h00, 8'h00,
                             8'hFF, 8'h11, 8'h00, 8'h00,
                             8'hAA, 8'hBB, 8'hCC, 8'hDD, 8'h55, 8'h66, 8'h77, 8'h88,
                             8'h11, 8'h22, 8'hEE, 8'hFF, 8'h00, 8'h1A, 8'h00, 8'h00};
  byte unsigned plain [$], cipher [$], expect_q [$];

  task automatic send_payload(input int from, input int n);
    for (int i = 0; i < 42 + n; i++) begin
      @(negedge clk);
      rx_data = (i < 42) ? hdr[i] : cipher[from + i - 42];
      rx_sof_n = (i != 0); rx_eof_n = (i != 41 + n); rx_src_rdy_n = 0;
    end
    @(negedge clk); rx_sof_n = 1; rx_eof_n = 1; rx_src_rdy_n = 1;
    repeat (12) @(negedge clk);   // inter-frame gap
  endtask

  // ---------------- host: receive ----------------
  byte unsigned frame [$], reply [$];
  int frames = 0, hdr_bad = 0, tx_stalls = 0;
  always @(negedge clk) tx_dst_rdy_n = ($urandom_range(0, 4) == 0);
  always @(posedge clk) begin
    if (!tx_src_rdy_n && tx_dst_rdy_n) tx_stalls++;
    if (!tx_src_rdy_n && !tx_dst_rdy_n) begin
      frame.push_back(tx_data);
      if (!tx_eof_n) begin
        automatic int n = frame.size() - 42;
        frames++;
        for (int i = 0; i < 6; i++) if (frame[i] != hdr[i + 6] || frame[i + 6] != hdr[i]) hdr_bad++;
        for (int i = 0; i < 4; i++) if (frame[26 + i] != hdr[30 + i] || frame[30 + i] != hdr[26 + i]) hdr_bad++;
        if ({frame[38], frame[39]} != 16'(n + 8))  hdr_bad++;
        if ({frame[16], frame[17]} != 16'(n + 28)) hdr_bad++;
        for (int i = 42; i < frame.size(); i++) reply.push_back(frame[i]);
        frame.delete();
      end
    end
  end

  // ---------------- memory-side observations ----------------
  int masked_words = 0, dead_words = 0, af_stalls = 0;
  always @(posedge mem_clk) begin
    if (app_wdf_wren && app_wdf_mask_data != '0) masked_words++;
    if (app_wdf_wren && app_wdf_mask_data == '1) dead_words++;
    if (app_af_afull && !dut.u_mem.af_empty) af_stalls++;
  end

  task automatic run_image(input string name, input int nbytes, input logic [28:0] lo,
                           input word_t exp_key, input bit exp_fail, input int exp_frames);
    int f0 = frames, d0 = images_done;
    reply.delete();
    key_lo_start = lo;
    for (int p = 0; p < nbytes; p += 1472) send_payload(p, (nbytes - p > 1472) ? 1472 : nbytes - p);
    send_payload(0, 0);
    fork
      begin
        while (images_done == d0 && !search_failed) @(negedge clk);
        repeat (2000) @(negedge clk);
      end
    join
    if (exp_fail) begin
      check({name, " search failed"}, search_failed, 1);
    end else begin
      check({name, " key found"}, key_found, 1);
      check({name, " key"}, found_key, exp_key);
    end
    check({name, " reply frames"}, frames - f0, exp_frames);
    check({name, " reply bytes"}, reply.size(), expect_q.size());
    for (int i = 0; i < expect_q.size() && i < reply.size(); i++)
      if (reply[i] != expect_q[i]) begin
        check($sformatf("%s reply byte %0d", name, i), reply[i], expect_q[i]);
        break;
      end
    checks++;
  endtask

  initial begin
    automatic int nb = 1480;
    int b0, h0;
    // image and its encryption
    plain = '{8'hFF, 8'hD8, 8'h33, 8'h44, 8'h55, 8'h66, 8'h77, 8'h88};
    for (int i = 8; i < nb; i++) plain.push_back(8'((i * 29) ^ (i >> 4) ^ 8'h5C));
    #1;
    rkey(32'h67AEF891);
    for (int i = 0; i < nb; i += 8) begin
      block_t b, c;
      for (int k = 0; k < 8; k++) b[63 - 8*k -: 8] = plain[i + k];
      c = renc(b);
      for (int k = 0; k < 8; k++) cipher.push_back(c[63 - 8*k -: 8]);
    end
    check("first cipher block", {cipher[0], cipher[1], cipher[2], cipher[3], cipher[4], cipher[5], cipher[6], cipher[7]},
          64'h55F498A5C51B16AB);

    repeat (4) @(negedge clk);
    rst = 0; mem_rst = 0;
    while (!dut.u_mem.mem_ready) @(negedge clk);

    // image A: the true key
    expect_q = plain;
    b0 = stat_batches; h0 = stat_hits;
    run_image("A", nb, 29'h07AEF890, 32'h67AEF891, 0, 2);
    check("A batches", stat_batches - b0, 2);
    check("A hits", stat_hits - h0, 1);
    check("A bursts written", mig.n_writes, 47);

    // image B: a false key is accepted
    rkey(32'h60003231);
    expect_q.delete();
    for (int i = 0; i < nb; i += 8) begin
      block_t c, p;
      for (int k = 0; k < 8; k++) c[63 - 8*k -: 8] = cipher[i + k];
      p = rdec(c);
      for (int k = 0; k < 8; k++) expect_q.push_back(p[63 - 8*k -: 8]);
    end
    check("B starts FFD8", {expect_q[0], expect_q[1]}, 16'hFFD8);
    run_image("B", nb, 29'h3230, 32'h60003231, 0, 2);
    check("B differs from image", (reply.size() > 8 && reply[8] != plain[8]) ? 1 : 0, 1);

    // image C: no key in the last batch
    expect_q.delete();
    b0 = stat_batches;
    run_image("C", 16, 29'h1FFFFFFF, 0, 1, 0);
    check("C one batch", stat_batches - b0, 1);

    check("reply headers", hdr_bad, 0);
    check("bytes dropped", rx_dropped, 0);
    // every mechanism happened
    check("mechanism: key batches", (stat_batches >= 5) ? 1 : 0, 1);
    check("mechanism: FFD8 hits", (stat_hits >= 2) ? 1 : 0, 1);
    check("mechanism: masked partial burst", (masked_words > 0) ? 1 : 0, 1);
    check("mechanism: fully masked word read back and discarded", (dead_words > 0) ? 1 : 0, 1);
    check("mechanism: memory back-pressure", (af_stalls > 0) ? 1 : 0, 1);
    check("mechanism: transmit back-pressure", (tx_stalls > 0) ? 1 : 0, 1);
    check("mechanism: multi-packet reply", (tx_packets >= 4) ? 1 : 0, 1);
    $display("counts: batches=%0d hits=%0d masked_words=%0d dead_words=%0d af_stalls=%0d tx_stalls=%0d tx_packets=%0d images=%0d",
             stat_batches, stat_hits, masked_words, dead_words, af_stalls, tx_stalls, tx_packets, images_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
