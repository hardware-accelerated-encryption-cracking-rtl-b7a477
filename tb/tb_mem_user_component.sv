// Self-checking testbench for mem_user_component with a behavioural DDR2
// controller model on a separate 200 MHz clock (user clock 125 MHz).
//
// Writes an "image" as packets: 3 packets of 64 bytes (whole bursts) and a
// last one of 21 bytes (partial burst, masked), ends each with mem_flush,
// then reads everything back and checks every byte, that the bytes past
// the end of the image in the last burst were masked (still zero), the
// number of bursts written and read, the last address, and read_done.
// The read side pops with random gaps; the model stalls at random.
module tb_mem_user_component;

  logic clk = 1'b0, mem_clk = 1'b0, rst = 1'b1, mem_rst = 1'b1;
  always #4 clk = ~clk;
  always #2.5 mem_clk = ~mem_clk;

  logic         mem_write = 0, mem_flush = 0, mem_clear = 0, mem_read = 0, read_ack = 0;
  logic [7:0]   write_data = '0;
  logic [127:0] read_data;
  logic         read_valid, read_done, mem_full, mem_ready;
  logic [30:0]  last_addr;
  logic         phy_init_done, app_af_wren, app_af_afull, app_wdf_wren, app_wdf_afull, rd_data_valid;
  logic [2:0]   app_af_cmd;
  logic [30:0]  app_af_addr;
  logic [127:0] app_wdf_data, rd_data_fifo_out;
  logic [15:0]  app_wdf_mask_data;

  int checks = 0, failures = 0;

  mem_user_component dut (.*);
  ddr2_mig_model mig (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [7:0] img(input int i);
    return 8'((i * 37 + 11) ^ (i >> 3));
  endfunction

  localparam int NBYTES = 3 * 64 + 21;

  initial begin
    int pos = 0, got = 0, words = 0;
    repeat (4) @(negedge clk);
    rst = 0; mem_rst = 0;
    while (!mem_ready) @(negedge clk);
    check("ready after calibration", mem_ready, 1);
    for (int p = 0; p < 4; p++) begin
      automatic int n = (p < 3) ? 64 : 21;
      for (int i = 0; i < n; i++) begin
        while (mem_full) @(negedge clk);
        mem_write = 1; write_data = img(pos); pos++;
        mem_flush = (i == n - 1);
        @(negedge clk);
        mem_write = 0; mem_flush = 0;
      end
      repeat (3) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    check("last address", last_addr, 4 * 7);
    check("bursts written", mig.n_writes, 7);
    mem_read = 1; @(negedge clk); mem_read = 0;
    while (!read_done) begin
      read_ack = read_valid && ($urandom_range(0, 2) != 0);
      if (read_ack) begin
        for (int b = 0; b < 16; b++) begin
          automatic int idx = words * 16 + b;
          if (idx < NBYTES) check($sformatf("byte %0d", idx), read_data[127 - 8*b -: 8], img(idx));
          else              check($sformatf("masked byte %0d", idx), read_data[127 - 8*b -: 8], 0);
        end
        words++;
      end
      @(negedge clk);
      read_ack = 0;
    end
    check("words read", words, 14);
    check("bursts read", mig.n_reads, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
